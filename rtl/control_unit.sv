// control_unit: communication control unit of the bridge.
//
// It sleeps in FREE until an event on the grant lines shows that a master
// won a cross-bus (external) transfer. In DECODE it reads the address
// decoder's answer for the master's address: an address in no range, or in
// a range of another bus than the one requested, goes to ERROR and raises
// Illegal_Address. Otherwise the unit sets the mux/demux control word
// cu = {init_bus, tgt_bus, write} and selects the adapter of the target bus,
// then runs a 4-phase handshake with it:
//   ACTIVE  : Req high, wait for Ack high (the adapter moves the data);
//   REQ_LOW : Req low, wait for Ack low;
//   RELEASE : the function in progress (adapter select) is de-asserted;
//   WAIT_GNT: wait for the grant lines to drop; the data path stays open so
//             the master can still collect read data from FIFO I.
// Leaving WAIT_GNT or ERROR pulses `flush` to empty both FIFOs.
// All outputs except flush are decoded from the registered state. The
// sequence is the document's; the DECODE and RELEASE steps as single clocks,
// the decoder check and the flush are this design's.
module control_unit
  import bridge_pkg::*;
#(
  parameter int unsigned NB = NBUS,
  localparam int unsigned SW = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the arbiter
  input  logic          ext_valid,
  input  logic [SW-1:0] ext_init_bus,
  input  logic [SW-1:0] ext_tgt_bus,
  // from the address decoder of the initiator's bus
  input  logic          dec_illegal,
  input  logic [SW-1:0] dec_bus,
  // direction of the initiator's transfer
  input  logic          init_write,
  // adapters (4-phase)
  input  logic          ack,
  output logic          req,
  output logic [NB-1:0] adapter_sel,
  // data path
  output logic [2*SW:0] cu,
  output logic          route_en,
  output logic          flush,
  // status
  output logic          illegal_address,
  output cu_state_e     state
);

  cu_state_e     st, st_n;
  logic [SW-1:0] init_q, tgt_q;
  logic          write_q;

  always_comb begin
    st_n = st;
    unique case (st)
      CU_FREE:     if (ext_valid) st_n = CU_DECODE;
      CU_DECODE:   st_n = (dec_illegal || dec_bus != ext_tgt_bus) ? CU_ERROR : CU_ACTIVE;
      CU_ACTIVE:   if (ack)  st_n = CU_REQ_LOW;
      CU_REQ_LOW:  if (!ack) st_n = CU_RELEASE;
      CU_RELEASE:  st_n = CU_WAIT_GNT;
      CU_WAIT_GNT: if (!ext_valid) st_n = CU_FREE;
      CU_ERROR:    if (!ext_valid) st_n = CU_FREE;
      default:     st_n = CU_FREE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= CU_FREE;
      init_q  <= '0;
      tgt_q   <= '0;
      write_q <= 1'b0;
    end else begin
      st <= st_n;
      if (st == CU_DECODE) begin
        init_q  <= ext_init_bus;
        tgt_q   <= ext_tgt_bus;
        write_q <= init_write;
      end
    end
  end

  always_comb begin
    req             = (st == CU_ACTIVE);
    adapter_sel     = '0;
    if (st == CU_ACTIVE || st == CU_REQ_LOW) adapter_sel[tgt_q] = 1'b1;
    route_en        = (st == CU_ACTIVE) || (st == CU_REQ_LOW) ||
                      (st == CU_RELEASE) || (st == CU_WAIT_GNT);
    cu              = {init_q, tgt_q, write_q};
    flush           = (st == CU_WAIT_GNT || st == CU_ERROR) && !ext_valid;
    illegal_address = (st == CU_ERROR);
    state           = st;
  end

  // 4-phase rule: Ack may only rise while Req is high
  a_ack_after_req: assert property (@(posedge clk) disable iff (!rst_n)
                                    $rose(ack) |-> $past(req));

endmodule
