// pibus_apb_adapter: protocol adapter from a PI-bus-style initiator to an
// AMBA APB target bus.
//
// The initiator announces its burst with master_size and master_items and
// its direction with master_wr. When selected by the control unit and asked
// with Req, the adapter loads Count with {master_items, master_size}, the
// number of beats that follow the first one (1 to 16 beats in all), and
// holds LOCK while Count is not zero, so the target bus is kept for the
// whole burst. Each beat is an APB setup clock (state 01) and access clock
// (state 10); after each access Count decrements, and the beat after which
// Count is zero ends the burst (state 11: Ack high until Req falls, then
// back to idle, state 00). A write beat takes one word from FIFO O; a read
// beat pushes the word read into FIFO I. A beat starts only when that word
// (write) or that room (read) is there, so a slow initiator only stretches
// the burst. Ack is low when not selected (OR-ed with other adapters).
// paddr starts at start_addr and steps by one data word per beat.
// The signal names, Count, LOCK and the state codes 00 and 10 follow the
// document's PI-bus/AMBA simulation; the concatenation giving Count and the
// codes 01 and 11 are this design's.
module pibus_apb_adapter
  import bridge_pkg::*;
#(
  parameter int unsigned DW = 32,
  parameter int unsigned AW = ADDR_W
) (
  input  logic          clk,
  input  logic          rst_n,
  // control unit (4-phase)
  input  logic          sel,
  input  logic          req,
  output logic          ack,
  // PI-bus-style initiator
  input  logic [1:0]    master_size,
  input  logic [1:0]    master_items,
  input  logic          master_wr,
  input  logic [AW-1:0] start_addr,
  // FIFO O side
  input  logic [DW-1:0] wr_data,
  input  logic          wr_valid,
  output logic          wr_ready,
  // FIFO I side
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
  output logic          lock,
  output logic [3:0]    count,
  output logic [1:0]    state
);

  typedef enum logic [1:0] {
    IDLE   = 2'b00,
    SETUP  = 2'b01,
    ACCESS = 2'b10,
    DONE   = 2'b11
  } ist_e;

  ist_e       st;
  logic       running;
  logic [3:0] cnt;
  logic       beat_ok;

  assign beat_ok  = pwrite ? wr_valid : rd_ready;
  assign wr_ready = running && pwrite && (st == IDLE) && wr_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= IDLE;
      running <= 1'b0;
      cnt     <= '0;
      paddr   <= '0;
      pwdata  <= '0;
      pwrite  <= 1'b0;
    end else begin
      unique case (st)
        IDLE: begin
          if (!running) begin
            if (sel && req) begin
              running <= 1'b1;
              cnt     <= {master_items, master_size};
              pwrite  <= master_wr;
              paddr   <= start_addr;
            end
          end else if (beat_ok) begin
            pwdata <= wr_data;
            st     <= SETUP;
          end
        end
        SETUP: st <= ACCESS;
        ACCESS: begin
          paddr <= paddr + AW'(DW / 8);
          if (cnt == '0) begin
            st <= DONE;
          end else begin
            cnt <= cnt - 4'd1;
            st  <= IDLE;
          end
        end
        DONE: begin
          if (!req) begin
            st      <= IDLE;
            running <= 1'b0;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  assign psel     = (st == SETUP) || (st == ACCESS);
  assign penable  = (st == ACCESS);
  assign rd_data  = prdata;
  assign rd_valid = (st == ACCESS) && !pwrite;
  assign ack      = sel && (st == DONE);
  assign lock     = running && (cnt != '0);
  assign count    = cnt;
  assign state    = st;

  a_penable_needs_psel: assert property (@(posedge clk) disable iff (!rst_n) penable |-> psel);

endmodule
