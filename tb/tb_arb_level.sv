// tb_arb_level: checks an arbitration module against a reference model of
// the priority rules, for two priority tables of the example system:
//  * bus1 (C1, C2, C5, C7, C12): (C1 = C2 = C7) > C5 > C12;
//  * bus2 (C3, C4, C6, C8, C9, C10, C11): C10 > (C3 = C6) >
//    (C4 = C9 = C11) > C8.
// The model grants the highest level with a request; inside a shared level
// it rotates after the member granted last. Random requests, enable and
// grant acceptance.
module tb_arb_level;
  import bridge_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int N1 = 5;
  localparam logic [N1*LVL_W-1:0] L1 = {4'd2, 4'd0, 4'd1, 4'd0, 4'd0};
  localparam int N2 = 7;
  localparam logic [N2*LVL_W-1:0] L2 = {4'd2, 4'd0, 4'd2, 4'd3, 4'd1, 4'd2, 4'd1};

  logic          en1, adv1, pend1, en2, adv2, pend2;
  logic [N1-1:0] req1, gnt1;
  logic [N2-1:0] req2, gnt2;

  arb_level #(.N(N1), .LEVEL(L1)) dut1 (.clk, .rst_n, .en(en1), .req(req1), .adv(adv1),
                                        .gnt(gnt1), .pending(pend1));
  arb_level #(.N(N2), .LEVEL(L2)) dut2 (.clk, .rst_n, .en(en2), .req(req2), .adv(adv2),
                                        .gnt(gnt2), .pending(pend2));

  // reference: last granted index per level, -1 = none yet
  int last1 [16];
  int last2 [16];

  function automatic int lv(logic [15*LVL_W+LVL_W-1:0] L, int i);
    return int'(L[i*LVL_W +: LVL_W]);
  endfunction

  function automatic int ref_pick(int n, logic [15*LVL_W+LVL_W-1:0] L, logic [15:0] r,
                                  int last [16], logic en);
    int best = 16;
    if (!en) return -1;
    for (int i = 0; i < n; i++) if (r[i] && lv(L, i) < best) best = lv(L, i);
    if (best == 16) return -1;
    // rotate among members of that level, by index, after the last one
    for (int k = 1; k <= n; k++) begin
      int i = (last[best] < 0) ? k - 1 : (last[best] + k) % n;
      if (r[i] && lv(L, i) == best) return i;
    end
    return -1;
  endfunction

  int e1, e2;
  logic [N1-1:0] exp1;
  logic [N2-1:0] exp2;

  initial begin
    for (int l = 0; l < 16; l++) begin last1[l] = -1; last2[l] = -1; end
    en1 = 0; en2 = 0; adv1 = 0; adv2 = 0; req1 = '0; req2 = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      req1 = N1'($urandom);
      req2 = N2'($urandom);
      if (n % 7 == 0) req1 = 5'b10100;   // only C5 and C12: fixed order
      en1  = ($urandom % 8) != 0;
      en2  = ($urandom % 8) != 0;
      adv1 = $urandom % 2;
      adv2 = $urandom % 2;
      #1;
      e1 = ref_pick(N1, {44'd0, L1}, 16'(req1), last1, en1);
      e2 = ref_pick(N2, {36'd0, L2}, 16'(req2), last2, en2);
      exp1 = (e1 < 0) ? '0 : N1'(1 << e1);
      exp2 = (e2 < 0) ? '0 : N2'(1 << e2);
      checks++;
      if (gnt1 !== exp1) begin
        failures++;
        $display("FAIL bus1 req=%b en=%b gnt=%b exp=%b", req1, en1, gnt1, exp1);
      end
      checks++;
      if (gnt2 !== exp2) begin
        failures++;
        $display("FAIL bus2 req=%b en=%b gnt=%b exp=%b", req2, en2, gnt2, exp2);
      end
      checks++;
      if (pend1 !== (req1 != '0) || pend2 !== (req2 != '0)) begin
        failures++;
        $display("FAIL pending");
      end
      @(posedge clk);
      if (adv1 && e1 >= 0) last1[lv({44'd0, L1}, e1)] = e1;
      if (adv2 && e2 >= 0) last2[lv({36'd0, L2}, e2)] = e2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
