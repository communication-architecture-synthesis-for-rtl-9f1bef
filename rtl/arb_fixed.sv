// arb_fixed: fixed-priority arbiter with N requesters (F(n) in the
// hierarchical arbiter).
//
// Requester 0 has the highest priority, requester N-1 the lowest. The grant
// is the lowest-numbered active request, as a one-hot vector; no request
// gives no grant. The arbiter is purely combinational: the enclosing level
// registers and holds grants. The document gives the mode (fixed priority,
// for requesters of different priorities); the index-order convention is
// this design's.
module arb_fixed #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);

  // Isolate the lowest set bit.
  assign gnt = req & (~req + N'(1));

endmodule
