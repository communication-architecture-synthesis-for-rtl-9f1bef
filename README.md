# A centralized bridge for a two-bus system on chip

When the masters of a system on chip are spread over several buses, most
traffic stays on one bus and only some of it crosses to another bus. This
design handles both cases with a single bridge between the buses:

* **Arbitration is hierarchical.** Each bus has its own *internal* arbiter,
  and the two internal arbiters run at the same time. This lets bus1 and
  bus2 each carry a local transfer in the same clock. A third, *external*
  arbiter grants cross-bus transfers. It is enabled only when no internal
  request is pending and both buses are free: local traffic always wins.
* **Adaptation is done in the bridge.** A cross-bus transfer goes through
  two FIFOs. FIFO O carries write data and FIFO I carries read data. Two
  multiplexer/demultiplexer stages connect the FIFOs to the initiator's bus
  and to the target's bus. The FIFO word is as wide as the widest bus, and
  narrower buses are packed and unpacked around it. The target bus is driven
  by a protocol adapter: a PCI-style burst (framed by `frame`) or a
  PI-bus-style burst (`master_size`, `master_items`) becomes AMBA APB
  transfers.
* **A control unit runs each cross-bus transfer.** It wakes on the external
  grant and checks the destination with the address decoder. It then sets
  the multiplexers and hands the transfer to the target bus's adapter over a
  four-phase Req/Ack handshake.

The RTL is configured for an example system of twelve components, C1 to C12:

| bus  | components                     | internal priority (high to low) |
|------|--------------------------------|---------------------------------|
| bus1 | C1, C2, C5, C7, C12            | (C1 = C2 = C7) > C5 > C12       |
| bus2 | C3, C4, C6, C8, C9, C10, C11   | C10 > (C3 = C6) > (C4 = C9 = C11) > C8 |

For cross-bus requests the priority is
(C7 = C4 = C9 = C11) > (C1 = C2 = C5) > (C3 = C6 = C8 = C10 = C12).

The components themselves are not part of the RTL. Their request, address
and data signals are ports of the top module `multibus_bridge`.

## How the arbiter is built from a priority table

This is the least obvious part of the design, and everything in it is set by
parameters.

Every arbitration module (`arb_level`) takes a table with one 4-bit level
per component. A smaller level means a higher priority. The all-ones value
(`LEVEL_NONE`) means the component is not a member of this module. At
elaboration, constant functions split the members into sub-modules:

1. A level shared by several members becomes a **round-robin** sub-module
   R(n) (`arb_round_robin`), because equal priorities must be served fairly.
2. A run of consecutive levels that hold one member each becomes one
   **fixed-priority** sub-module F(n) (`arb_fixed`), ordered by level.
   Members of different priorities are merged only if their levels are
   adjacent. For example, C10 and C8 on bus2 are not merged, because the
   round-robin levels (C3, C6) and (C4, C9, C11) sit between them.
3. A fixed-priority arbiter **F_int** over the sub-modules, in level order,
   decides which sub-module may see its requests. A lower sub-module is
   served only when no higher sub-module has a request.

For bus1 this gives R(3) for {C1, C2, C7}, F(2) for C5 > C12, and F_int(2).
For bus2 it gives F(1) C10, R(2) {C3, C6}, R(3) {C4, C9, C11}, F(1) C8 and
F_int(4). For the external module it gives R(4), R(3), R(5) and F_int(3).

`multibus_arbiter` puts three such modules together: one internal module per
bus and one external module.

* `req[j][i]` is component C(i+1) asking for bus j.
* If bus j is C(i+1)'s own bus, the request goes to the internal module of
  bus j. Otherwise it goes to the external module.

**Grant timing**

* Grants are registered. A grant appears one clock after it is won.
* A grant stays high for as long as the request stays high.
* The grant drops one clock after the request falls, so there is one idle
  clock between two owners of a bus.
* A round-robin sub-module moves on only when its grant is actually taken.

**External grants**

* An external grant raises the owner's grant line on *both* buses. The owner
  holds its own bus (to stream data to the bridge) and the other bus (where
  the bridge's adapter acts).
* `ext_valid`, `ext_gnt`, `ext_init_bus` and `ext_tgt_bus` describe the
  external grant to the control unit.

**Mask-Reqs**

* `mask_reqs[j]` stops any new grant on bus j. A master raises it for the
  duration of a burst.
* Inside the top, bus1's mask is also raised by the PI-bus adapter's LOCK.
  This keeps bus1 reserved while a PI-bus burst is being written into it.

## Address decoding

Each component owns one address range. An `addr_decoder` per bus turns the
address on that bus into:

* a one-hot chip select;
* the bus of the addressed component;
* `illegal_address` for an address in no range.

The top masks the chip selects so that each bus only drives the selects of
its own components.

The example map is this design's choice, over 16-bit addresses:

* Ck owns `k*0x1000` to `k*0x1000 + 0xFFF`.
* `0x0000`–`0x0FFF` and `0xD000`–`0xFFFF` are illegal.

The map is a parameter pair (`BASE`, `LIMIT`).

## Control unit and the Req/Ack handshake

`control_unit` is a state machine that moves through these states:

```
FREE -> DECODE -> ACTIVE -> REQ_LOW -> RELEASE -> WAIT_GNT -> FREE
                \-> ERROR (Illegal_Address) -> FREE when the grant drops
```

* **FREE**: idle. It leaves FREE when the arbiter reports an external grant.
* **DECODE**: one clock reading the decoder. If the address is in no range,
  or belongs to a component on a different bus than the one the master
  asked for, the unit goes to ERROR and holds `illegal_address` until the
  grant drops.
* Otherwise it drives the data path control word
  `cu = {initiator bus, target bus, write}` and selects the target bus's
  adapter.
* **ACTIVE**: Req is high; the unit waits for Ack.
* **REQ_LOW**: Req is low; the unit waits for Ack to fall.
* **RELEASE**: the adapter select is removed.
* **WAIT_GNT**: the unit waits for the grant lines to drop. The data path
  stays open, so a reading master can still empty FIFO I.
* Leaving WAIT_GNT or ERROR pulses `flush`, which empties both FIFOs.

The adapters' Ack lines are combined with an OR, and an adapter that is not
selected drives 0. The original scheme lets unselected adapters release the
line to high impedance. An OR is the on-chip equivalent.

## Data path and width adaptation

`bridge_datapath` holds FIFO O and FIFO I (`sync_fifo`) between an
initiator-side stage and a target-side stage. It is written for any number
of buses; its own default is three buses, which gives the 5-bit control word
CU[4:0]. The top uses it with two buses, where `cu` is 3 bits.

* The write path is initiator bus → FIFO O → target bus.
* The read path is target bus → FIFO I → initiator bus.
* Every port is a valid/ready stream of one FIFO word.

`sync_fifo` supports both FIFO protocols:

* **Blocking**: Full and Empty are produced, and a push while full or a pop
  while empty is ignored.
* **Non-blocking**: no status is produced, and the producer and consumer must
  match rates by construction.

The bridge uses the blocking protocol. The read port is show-ahead. Both
sides run on one clock: the FIFOs absorb the difference in transfer
*rates* between buses, not a difference in clocks.

**Width adaptation.** The FIFO word is `QW = max(BUS1_W, BUS2_W)`, which is
32 bits in the example (bus1 32 bits, bus2 16 bits). On the narrower bus:

* `width_pack` collects 16-bit beats into a 32-bit word, first beat in the
  low half;
* `width_unpack` sends a word as two beats, low half first.

The same blocks handle the classic 16-bit to 8-bit case at their default
parameters. `width_unpack` releases the FIFO word together with its last
part, so it needs no extra register.

## Protocol adapters

**`pci_apb_adapter`** (bus1 masters → bus2 targets). The master holds
`frame` high for its burst.

* Once selected and asked with Req, the adapter issues APB transfers
  starting at `start_addr`.
* Each transfer is a setup clock (Psel, state "-") followed by an Activation
  clock (Psel and Penable).
* Writes take one word from FIFO O each, and a run of writes keeps Psel high
  (2 clocks per word).
* Reads are issued while `frame` is high and FIFO I has room. After each
  read the adapter returns to Libre (idle) for one clock, so the room in
  FIFO I is re-checked before the next read (3 clocks per word).
* After `frame` falls and the last write has gone out, the adapter raises
  Ack until Req falls.

**`pibus_apb_adapter`** (bus2 masters → bus1 targets). The master gives
`master_size`, `master_items` and `master_wr`.

* The adapter loads a 4-bit Count with `{master_items, master_size}`, the
  number of beats after the first (1 to 16 beats).
* It holds LOCK while Count is not zero.
* Each beat is a setup clock (state 01) and an access clock (state 10).
  Count drops by one after every access.
* When the beat with Count = 0 is done, the adapter sends Ack (state 11) and
  returns to idle (00).
* A beat starts only when its write word, or room for its read word, is
  available.

## Top level: a cross-bus transfer step by step

`multibus_bridge` connects all of the above. Here is what a bus1 master Ck
does to write to a bus2 component:

1. It raises `req[1][k-1]` and waits for `gnt[1][k-1]`. It arrives after any
   pending internal requests are served and both buses are free.
2. It drives the target address on `bus_addr[0]`, sets `pci_write = 1` and
   raises `pci_frame`.
3. It streams 32-bit words on `m_wdata[0]` / `m_wvalid[0]`, taken when
   `m_wready[0]` is high. FIFO O fills when bus2 is slower.
4. It drops `pci_frame`. The bridge writes every word on bus2 as two 16-bit
   APB writes on `apb_p*[1]`.
5. When `cu_state` reaches WAIT_GNT, it drops its request.

A read is the same, with `pci_write = 0`. The words come back on
`m_rdata[0]` / `m_rvalid[0]`.

A bus2 master uses `pi_master_*` in place of the frame signals and exchanges
16-bit halves in the low bits of `m_wdata[1]` / `m_rdata[1]`.

Internal transfers do not touch the data path. The bridge only grants them
and drives the chip selects.

Status outputs (`cu_state`, `pci_state`, `pi_state`, `pi_count`, `pi_lock`,
`fo_count`, `fi_count`, `ext_gnt`, `illegal_address`) are there for
observation and error handling.

## Parameters

| parameter (top) | default | meaning |
|---|---|---|
| `BUS1_W` | 32 | bus1 data width (PCI-style, 32-bit) |
| `BUS2_W` | 16 | bus2 data width (this design's choice) |
| `FIFO_DEPTH` | 8 | words per FIFO (this design's choice) |
| `BUS_OF` | example | bus of each component (0 = bus1, 1 = bus2) |
| `INT_LEVEL`, `EXT_LEVEL` | example | priority level of each component, internal and external |
| `BASE`, `LIMIT` | 4 KiB per component | address ranges |

The example tables live in `bridge_pkg`. To describe another system,
change the tables there or override the parameters. The arbiter structure
follows from the tables on its own.

## Departures from the reference architecture and open points

* **Ack line.** It uses an OR with unselected adapters at 0, instead of a
  high-impedance line.
* **Clocking.** There is one clock for the whole bridge. Buses with
  unrelated clocks would need dual-clock FIFOs, which are not provided.
* **Sizes not given by the source.** FIFO depth and bus2 width are this
  design's choices. The source sizes FIFOs with
  `Q(n) = max(0, Q(n-1) + P(n) - C(n))`, which needs a production and
  consumption profile for the real traffic.
* **PCI-side reads.** They take 3 clocks per word (a Libre clock after each
  read). The reference waveform shows back-to-back setup/Activation pairs
  with Psel held high, which this design does for writes only.
* **PI-bus Count.** The combination `{master_items, master_size}` is this
  design's reading. The reference waveform shows Count = 0011 where this
  reading gives 0001, so check Count against the real PI-bus definition
  before relying on it.
* **Protocol pairing.** Which protocol runs on which bus (PCI-style masters
  on bus1, PI-bus-style masters on bus2, APB targets on both) is this
  design's choice.
* **Arbitration modes.** Only fixed-priority and round-robin sub-modules
  exist. TDMA, daisy-chain and first-come-first-granted modes are not
  provided.
* **Priority tables.** They are taken as given. The cost-function algorithm
  that orders the components is an offline step and is not part of the
  hardware.
* **Illegal addresses.** An illegal or wrong-bus address in a cross-bus
  transfer is reported and the transfer is dropped. There is no retry.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>`.
Each one prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_arb_fixed` | all request patterns, 2 and 4 requesters |
| `tb_arb_round_robin` | rotation order, random traffic against a model |
| `tb_arb_level` | bus1 and bus2 tables against a reference priority model |
| `tb_multibus_arbiter` | grant order on both buses, concurrency, internal before external, external order, Mask-Reqs, one-clock grant latency |
| `tb_addr_decoder` | all 65,536 addresses |
| `tb_control_unit` | legal and illegal sequences, handshake order, flush |
| `tb_sync_fifo` | random traffic against a queue model, both protocols |
| `tb_width_pack`, `tb_width_unpack` | beat order, random stalls on both sides, one beat per clock when not stalled |
| `tb_bridge_datapath` | three buses (CU[4:0]), several control words in both directions, full FIFO O, idle path, flush |
| `tb_pci_apb_adapter` | write bursts at 2 clocks per word, stalled writes, read burst at 3 clocks per word |
| `tb_pibus_apb_adapter` | all 16 size/items pairs in both directions: beats, Count, LOCK, state codes |
| `tb_multibus_bridge` | the whole bridge at its default parameters (see below) |

`tb_multibus_bridge` runs the top with no parameter overrides. It covers:

* concurrent internal transfers on both buses;
* cross-bus writes and reads in both directions, with FIFO O filling up;
* 32-bit to 16-bit splitting and 16-bit to 32-bit packing;
* LOCK held over PI-bus bursts;
* two kinds of illegal address;
* an external request that waits for an internal one;
* Mask-Reqs;
* cross communication: a bus1 master and a bus2 master ask for each
  other's bus in the same clock and are served one after the other, in
  round-robin order.

It counts each of these and fails if one never happened. All testbenches
pass. Each one was also run against a deliberately broken copy of its
module and reported failures.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_multibus_bridge \
    -y rtl -y tb +libext+.sv rtl/bridge_pkg.sv tb/tb_multibus_bridge.sv
./obj_dir/Vtb_multibus_bridge
```

The RTL uses `logic`, `always_ff`/`always_comb`, a shared package with
enums, typed parameters, and concurrent assertions for the handshake and bus
rules:

* at most one owner per bus;
* no internal grant during an external one;
* Ack only after Req;
* Penable only with Psel.

Reset is asynchronous and active low throughout. At the default parameters
the top synthesizes to about 900 cells, 244 flip-flop bits and two 8 × 32
FIFO memories.

## Files

| file | content |
|---|---|
| `rtl/bridge_pkg.sv` | example system tables, address map, state enum |
| `rtl/multibus_bridge.sv` | top |
| `rtl/multibus_arbiter.sv`, `rtl/arb_level.sv`, `rtl/arb_round_robin.sv`, `rtl/arb_fixed.sv` | hierarchical arbiter |
| `rtl/addr_decoder.sv` | address decoder |
| `rtl/control_unit.sv` | control unit |
| `rtl/bridge_datapath.sv`, `rtl/sync_fifo.sv` | FIFO data path |
| `rtl/width_pack.sv`, `rtl/width_unpack.sv` | width adaptation |
| `rtl/pci_apb_adapter.sv`, `rtl/pibus_apb_adapter.sv` | protocol adapters |
| `tb/tb_*.sv` | testbenches |
