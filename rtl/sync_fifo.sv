// sync_fifo: the bridge's FIFO buffer (FIFO I and FIFO O).
//
// A circular buffer of DEPTH words of WIDTH bits with a show-ahead read
// port: rdata is the oldest word whenever the FIFO is not empty, and `pop`
// removes it at the clock edge. `push` writes wdata at the clock edge.
// `flush` empties the FIFO.
//
// Two protocols, chosen by BLOCKING:
//  * blocking (1): Full and Empty synchronise producer and consumer; a push
//    while full and a pop while empty are ignored;
//  * non-blocking (0): no status is announced (full and empty stay low) and
//    push/pop are never refused: producer and consumer must guarantee by
//    their own rates that neither overruns the other.
// Both protocols are the document's; the depth default and the single
// clock shared by both sides are this design's (the bridge runs both buses
// from one clock and adapts their transfer rates, not their clocks).
module sync_fifo #(
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned DEPTH    = 8,
  parameter bit          BLOCKING = 1'b1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  input  logic                       push,
  input  logic [WIDTH-1:0]           wdata,
  input  logic                       pop,
  output logic [WIDTH-1:0]           rdata,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [CW-1:0]    cnt;
  logic             is_full, is_empty;
  logic             do_push, do_pop;

  assign is_full  = (cnt == CW'(DEPTH));
  assign is_empty = (cnt == '0);
  assign do_push  = push && (!BLOCKING || !is_full || pop);
  assign do_pop   = pop  && (!BLOCKING || !is_empty);

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
      cnt  <= '0;
    end else if (flush) begin
      wptr <= '0;
      rptr <= '0;
      cnt  <= '0;
    end else begin
      if (do_push) wptr <= next_ptr(wptr);
      if (do_pop)  rptr <= next_ptr(rptr);
      cnt <= cnt + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push && !flush) mem[wptr] <= wdata;
  end

  assign rdata = mem[rptr];
  assign full  = BLOCKING ? is_full  : 1'b0;
  assign empty = BLOCKING ? is_empty : 1'b0;
  assign count = cnt;

endmodule
