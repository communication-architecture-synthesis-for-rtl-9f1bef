// multibus_arbiter: hierarchical arbiter of the two-bus bridge.
//
// Level 1 of the hierarchy is made of three arbitration modules (arb_level):
// one internal module per bus, for components that talk to a component of
// their own bus, and one external module for components that want the other
// bus through the bridge. The two internal modules work concurrently, so
// bus1 and bus2 can each carry a transfer at the same time. Internal
// communication has priority over external: the external module is enabled
// only when no internal request is pending on either bus, and a cross-bus
// transfer needs both buses free.
//
// Requests and grants use the R_i^j / G_i^j naming: req[j][i] is component
// C(i+1) asking for bus j, gnt[j][i] grants it. A component on bus j asking
// for bus j makes an internal request; asking for the other bus, an external
// one. Grants are registered: a grant appears one clock after it is won and
// is held for as long as its request stays high, then dropped the clock
// after the request falls. An external grant holds both buses, so it
// raises the component's grant line of both buses. While mask_reqs[j] (Mask-Reqs, raised by the
// master running a burst) is high no new grant is given on bus j.
// ext_valid/ext_gnt/ext_init_bus/ext_tgt_bus describe the external grant
// for the bridge's control unit. The level structure follows the document;
// the registered hold-until-release grant and the one idle clock between two
// owners are this design's.
module multibus_arbiter
  import bridge_pkg::*;
#(
  parameter int unsigned             NC        = NCOMP,
  parameter logic [NC-1:0]           BUS_OF    = EX_BUS_OF,
  parameter logic [NC*LVL_W-1:0]     INT_LEVEL = EX_INT_LEVEL,
  parameter logic [NC*LVL_W-1:0]     EXT_LEVEL = EX_EXT_LEVEL
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NBUS-1:0][NC-1:0]   req,
  input  logic [NBUS-1:0]           mask_reqs,
  output logic [NBUS-1:0][NC-1:0]   gnt,
  output logic                      ext_valid,
  output logic [NC-1:0]             ext_gnt,
  output logic                      ext_init_bus,
  output logic                      ext_tgt_bus
);

  // internal levels of bus j: members are the components allocated to bus j
  function automatic logic [NC*LVL_W-1:0] bus_levels(int unsigned j);
    logic [NC*LVL_W-1:0] v;
    for (int unsigned i = 0; i < NC; i++)
      v[i*LVL_W +: LVL_W] = (int'(BUS_OF[i]) == int'(j)) ? INT_LEVEL[i*LVL_W +: LVL_W]
                                                         : LEVEL_NONE;
    return v;
  endfunction

  logic [NBUS-1:0][NC-1:0] int_req;
  logic [NC-1:0]           ext_req;

  always_comb begin
    for (int j = 0; j < int'(NBUS); j++)
      for (int i = 0; i < int'(NC); i++)
        int_req[j][i] = req[j][i] && (int'(BUS_OF[i]) == j);
    for (int i = 0; i < int'(NC); i++)
      ext_req[i] = req[!BUS_OF[i]][i];
  end

  logic [NBUS-1:0][NC-1:0] int_q;   // internal grant holder per bus
  logic [NC-1:0]           ext_q;   // external grant holder
  logic [NBUS-1:0][NC-1:0] int_win;
  logic [NC-1:0]           ext_win;
  logic [NBUS-1:0]         int_en, int_pend, int_take;
  logic                    ext_en, ext_take, ext_pend;

  // ---- internal level: one module per bus, concurrent ------------------------
  for (genvar j = 0; j < NBUS; j++) begin : g_int
    arb_level #(.N(NC), .LEVEL(bus_levels(j))) u_int (
      .clk    (clk),
      .rst_n  (rst_n),
      .en     (int_en[j]),
      .req    (int_req[j]),
      .adv    (int_take[j]),
      .gnt    (int_win[j]),
      .pending(int_pend[j])
    );
    assign int_en[j]   = (int_q[j] == '0) && (ext_q == '0) && !mask_reqs[j];
    assign int_take[j] = int_en[j] && (int_win[j] != '0);
  end

  // ---- external level: enabled only when the internal level is idle ---------
  arb_level #(.N(NC), .LEVEL(EXT_LEVEL)) u_ext (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (ext_en),
    .req    (ext_req),
    .adv    (ext_take),
    .gnt    (ext_win),
    .pending(ext_pend)
  );
  assign ext_en   = (int_pend == '0) && (int_q == '0) && (ext_q == '0) && (mask_reqs == '0);
  assign ext_take = ext_en && (ext_win != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int_q <= '0;
      ext_q <= '0;
    end else begin
      for (int j = 0; j < int'(NBUS); j++) begin
        if (int_take[j])                          int_q[j] <= int_win[j];
        else if ((int_q[j] & int_req[j]) == '0)   int_q[j] <= '0;
      end
      if (ext_take)                    ext_q <= ext_win;
      else if ((ext_q & ext_req) == '0) ext_q <= '0;
    end
  end

  always_comb begin
    for (int j = 0; j < int'(NBUS); j++)
      for (int i = 0; i < int'(NC); i++)
        gnt[j][i] = int_q[j][i] || ext_q[i];
  end

  assign ext_valid    = (ext_q != '0);
  assign ext_gnt      = ext_q;
  assign ext_init_bus = |(ext_q & BUS_OF);
  assign ext_tgt_bus  = ext_valid && !ext_init_bus;

  // ---- bus rules ---------------------------------------------------------------
  for (genvar j = 0; j < NBUS; j++) begin : g_chk
    a_onehot_int: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(int_q[j]));
    a_no_int_during_ext: assert property (@(posedge clk) disable iff (!rst_n)
                                          !((int_q[j] != '0) && (ext_q != '0)));
  end
  a_onehot_ext: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ext_q));
  a_ext_win_pending: assert property (@(posedge clk) disable iff (!rst_n) ext_take |-> ext_pend);

endmodule
