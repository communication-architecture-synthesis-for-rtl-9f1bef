// arb_level: one arbitration module of the hierarchical arbiter (one
// "machine": the internal module of a bus, or the external module).
//
// Each requester carries a priority level (smaller = higher priority,
// LEVEL_NONE = not a member). At elaboration the requesters are split into
// sub-modules: a level shared by several requesters becomes a round-robin
// sub-module R(n); consecutive levels that hold one requester each are
// merged into one fixed-priority sub-module F(n), ordered by level. A
// fixed-priority arbiter F_int over the sub-modules, in level order, picks
// the sub-module whose requests may pass: each sub-module sees its requests
// only while F_int grants it, so a lower sub-module is served only when no
// higher one has a request. With the default levels (bus1 of the example)
// this gives R(3) for {C1, C2, C7}, F(2) for C5 > C12 and F_int(2).
//
// Interface: `req` and the one-hot `gnt` are combinational; `en` gates the
// whole module; `adv` (one cycle) tells the round-robin sub-modules that the
// current grant was taken. `pending` is high when any member requests.
// Requests of non-members (LEVEL_NONE) are ignored, so a lint tool reports
// those req bits as unused for a given LEVEL table; that is intended.
// The grouping rule and F_int follow the document; level encoding and the
// `adv` handshake are this design's.
module arb_level
  import bridge_pkg::*;
#(
  parameter int unsigned            N     = 5,
  // default: bus1 requesters in the order C1, C2, C5, C7, C12
  parameter logic [N*LVL_W-1:0]     LEVEL = {4'd2, 4'd0, 4'd1, 4'd0, 4'd0}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [N-1:0] req,
  input  logic         adv,
  output logic [N-1:0] gnt,
  output logic         pending
);

  // ---- elaboration-time grouping ------------------------------------------
  function automatic int unsigned lvl(int unsigned i);
    return int'(LEVEL[i*LVL_W +: LVL_W]);
  endfunction

  function automatic int unsigned lvl_count(int unsigned l);
    int unsigned c = 0;
    for (int unsigned i = 0; i < N; i++) if (lvl(i) == l) c++;
    return c;
  endfunction

  // sub-module index of level l (-1 when the level is empty)
  function automatic int mod_of_level(int unsigned l);
    int m = -1;
    bit prev_single = 1'b0;
    int res = -1;
    for (int unsigned k = 0; k < int'(LEVEL_NONE); k++) begin
      int unsigned c = lvl_count(k);
      if (c > 1) begin
        m++;
        prev_single = 1'b0;
      end else if (c == 1) begin
        if (!prev_single) m++;
        prev_single = 1'b1;
      end
      if (k == l && c != 0) res = m;
    end
    return res;
  endfunction

  function automatic int unsigned n_mod();
    int m = -1;
    for (int unsigned k = 0; k < int'(LEVEL_NONE); k++)
      if (mod_of_level(k) > m) m = mod_of_level(k);
    return int'(m + 1);
  endfunction

  function automatic int unsigned mod_size(int unsigned m);
    int unsigned s = 0;
    for (int unsigned i = 0; i < N; i++)
      if (lvl(i) != int'(LEVEL_NONE) && mod_of_level(lvl(i)) == int'(m)) s++;
    return s;
  endfunction

  function automatic arb_mode_e mod_mode(int unsigned m);
    for (int unsigned k = 0; k < int'(LEVEL_NONE); k++)
      if (mod_of_level(k) == int'(m) && lvl_count(k) > 1) return ARB_RR;
    return ARB_FIXED;
  endfunction

  // position of requester i inside sub-module m (level order, then index),
  // or -1 when i is not a member of m
  function automatic int pos_in_mod(int unsigned m, int unsigned i);
    int p = 0;
    if (lvl(i) == int'(LEVEL_NONE) || mod_of_level(lvl(i)) != int'(m)) return -1;
    for (int unsigned k = 0; k < N; k++) begin
      if (lvl(k) != int'(LEVEL_NONE) && mod_of_level(lvl(k)) == int'(m) &&
          (lvl(k) < lvl(i) || (lvl(k) == lvl(i) && k < i)))
        p++;
    end
    return p;
  endfunction

  localparam int unsigned NM = n_mod();

  // ---- structure ------------------------------------------------------------
  logic [NM-1:0]         grp_req;
  logic [NM-1:0]         grp_gnt;
  logic [NM-1:0][N-1:0]  part;

  for (genvar m = 0; m < NM; m++) begin : g_mod
    localparam int unsigned SZ = mod_size(m);
    localparam arb_mode_e   MD = mod_mode(m);
    logic [SZ-1:0] sreq, sreq_gated, sgnt;

    for (genvar i = 0; i < N; i++) begin : g_in
      localparam int POS = pos_in_mod(m, i);
      if (POS >= 0) begin : g_member
        assign sreq[POS]  = req[i];
        assign part[m][i] = sgnt[POS];
      end else begin : g_other
        assign part[m][i] = 1'b0;
      end
    end

    assign grp_req[m]  = |sreq;
    assign sreq_gated  = sreq & {SZ{grp_gnt[m]}};

    if (MD == ARB_RR) begin : g_rr
      arb_round_robin #(.N(SZ)) u_rr (
        .clk  (clk),
        .rst_n(rst_n),
        .req  (sreq_gated),
        .adv  (adv & grp_gnt[m]),
        .gnt  (sgnt)
      );
    end else begin : g_fixed
      arb_fixed #(.N(SZ)) u_fixed (
        .req(sreq_gated),
        .gnt(sgnt)
      );
    end
  end

  // F_int: sub-modules in level order, the first one highest
  arb_fixed #(.N(NM)) u_fint (
    .req(grp_req & {NM{en}}),
    .gnt(grp_gnt)
  );

  always_comb begin
    gnt = '0;
    for (int m = 0; m < int'(NM); m++) gnt |= part[m];
  end

  assign pending = |grp_req;

endmodule
