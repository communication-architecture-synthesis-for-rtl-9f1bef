// pci_apb_adapter: protocol adapter from a PCI-style initiator to an AMBA
// APB target bus.
//
// The initiator frames its burst with `frame`, held high from its first to
// its last data word. Once selected by the control unit and asked with Req,
// the adapter turns the burst into APB transfers on the target bus, each a
// setup clock ("-": Psel high, Penable low) followed by an activation clock
// (Psel and Penable high), as in the PCI/AMBA simulation of the document:
//   write: every word taken from FIFO O becomes one APB write;
//   read : APB reads are made while frame is high and FIFO I has room; every
//          word read is pushed into FIFO I.
// Back-to-back write beats keep Psel high and give one word every two
// clocks. A read beat is followed by one Libre clock, so that the room left
// in FIFO I is known before the next read starts: three clocks per word.
// When frame has dropped (and, for a write, no word is left) the adapter
// raises Ack, holds it until Req falls, and returns to Libre (idle). When it
// is not selected, Ack stays low: it is OR-ed with the other adapters' Ack
// instead of being released to high impedance. paddr starts at start_addr
// and steps by one data word per beat.
// The state names and the Psel/Penable pattern follow the document's
// waveform; the exact signal set of the initiator side is this design's.
module pci_apb_adapter
  import bridge_pkg::*;
#(
  parameter int unsigned DW = 16,
  parameter int unsigned AW = ADDR_W
) (
  input  logic          clk,
  input  logic          rst_n,
  // control unit (4-phase)
  input  logic          sel,
  input  logic          req,
  output logic          ack,
  // PCI-style initiator
  input  logic          frame,
  input  logic          write,
  input  logic [AW-1:0] start_addr,
  // FIFO O side (write data towards the target)
  input  logic [DW-1:0] wr_data,
  input  logic          wr_valid,
  output logic          wr_ready,
  // FIFO I side (read data towards the initiator)
  output logic [DW-1:0] rd_data,
  output logic          rd_valid,
  input  logic          rd_ready,
  // APB master on the target bus
  output logic          psel,
  output logic          penable,
  output logic          pwrite,
  output logic [AW-1:0] paddr,
  output logic [DW-1:0] pwdata,
  input  logic [DW-1:0] prdata,
  // status
  output logic [1:0]    state
);

  typedef enum logic [1:0] {
    LIBRE      = 2'd0,  // free / idle
    SETUP      = 2'd1,  // "-"
    ACTIVATION = 2'd2,
    FIN        = 2'd3   // Ack high
  } pst_e;

  pst_e          st;
  logic          running;   // a burst is being served
  logic          write_q;
  logic          beat_ok, burst_end;

  // can a new beat start now?
  assign beat_ok   = write_q ? wr_valid : (frame && rd_ready);
  // is the burst over?
  assign burst_end = !frame && (!write_q || !wr_valid);

  assign wr_ready = sel && running && write_q && (st == LIBRE || st == ACTIVATION) && wr_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= LIBRE;
      running <= 1'b0;
      write_q <= 1'b0;
      paddr   <= '0;
      pwdata  <= '0;
      pwrite  <= 1'b0;
    end else begin
      unique case (st)
        LIBRE, ACTIVATION: begin
          if (st == ACTIVATION) paddr <= paddr + AW'(DW / 8);
          if (!running) begin
            if (sel && req) begin
              running <= 1'b1;
              write_q <= write;
              pwrite  <= write;
              paddr   <= start_addr;
            end
            st <= LIBRE;
          end else if (beat_ok && (st == LIBRE || write_q)) begin
            pwdata <= wr_data;
            st     <= SETUP;
          end else if (burst_end) begin
            st <= FIN;
          end else begin
            st <= LIBRE;
          end
        end
        SETUP: st <= ACTIVATION;
        FIN: begin
          if (!req) begin
            st      <= LIBRE;
            running <= 1'b0;
          end
        end
        default: st <= LIBRE;
      endcase
    end
  end

  assign psel     = (st == SETUP) || (st == ACTIVATION);
  assign penable  = (st == ACTIVATION);
  assign rd_data  = prdata;
  assign rd_valid = (st == ACTIVATION) && !write_q;
  assign ack      = sel && (st == FIN);
  assign state    = st;

  a_penable_needs_psel: assert property (@(posedge clk) disable iff (!rst_n) penable |-> psel);
  a_access_after_setup: assert property (@(posedge clk) disable iff (!rst_n)
                                         $rose(penable) |-> $past(psel && !penable));

endmodule
