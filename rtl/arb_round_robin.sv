// arb_round_robin: round-robin arbiter with N requesters (R(n) in the
// hierarchical arbiter), for requesters of equal priority.
//
// A mask register holds the requesters that come after the one granted
// last. The combinational grant is the lowest active request inside the
// mask, or, if none, the lowest active request overall. When `adv` is high
// the caller has accepted the current grant and the mask moves past it, so
// the next grant goes to the following requester in circular order.
// Interface: req/gnt one-hot, adv one cycle per accepted grant. Reset makes
// requester 0 first. The document gives the mode; the mask technique is
// this design's.
module arb_round_robin #(
  parameter int unsigned N = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         adv,
  output logic [N-1:0] gnt
);

  logic [N-1:0] mask_q;
  logic [N-1:0] masked;
  logic [N-1:0] gnt_masked, gnt_plain;

  assign masked     = req & mask_q;
  assign gnt_masked = masked & (~masked + N'(1));
  assign gnt_plain  = req & (~req + N'(1));
  assign gnt        = (masked != '0) ? gnt_masked : gnt_plain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask_q <= '1;
    end else if (adv && gnt != '0) begin
      // all requesters strictly after the granted one
      mask_q <= ~((gnt << 1) - N'(1));
    end
  end

endmodule
