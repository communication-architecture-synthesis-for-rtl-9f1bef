// tb_arb_round_robin: random requests against a reference round-robin
// model (next requester after the last one granted, in circular order),
// for N = 3 (R(3)) and N = 1. Also checks the rotation by hand: with all
// three requesting, grants go 0, 1, 2, 0.
module tb_arb_round_robin;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] req, gnt;
  logic       adv;
  logic [0:0] req1, gnt1;

  arb_round_robin #(.N(3)) dut  (.clk, .rst_n, .req, .adv, .gnt);
  arb_round_robin #(.N(1)) dut1 (.clk, .rst_n, .req(req1), .adv, .gnt(gnt1));

  int last;  // index granted last, -1 after reset
  int nlast;

  function automatic logic [2:0] ref_gnt(logic [2:0] r, int l);
    for (int k = 1; k <= 3; k++) begin
      int i = (l + k) % 3;
      if (l < 0) i = k - 1;
      if (r[i]) return 3'(1 << i);
    end
    return '0;
  endfunction

  task automatic check_now();
    logic [2:0] e;
    e = ref_gnt(req, last);
    checks++;
    if (gnt !== e) begin
      failures++;
      $display("FAIL t=%0t req=%b last=%0d gnt=%b exp=%b", $time, req, last, gnt, e);
    end
    checks++;
    if (gnt1 !== req1) begin
      failures++;
      $display("FAIL N=1 req=%b gnt=%b", req1, gnt1);
    end
  endtask

  initial begin
    req = '0; adv = 0; req1 = '0; last = -1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // directed rotation
    req = 3'b111; adv = 1;
    for (int n = 0; n < 4; n++) begin
      if (n > 0) @(negedge clk);
      #1 check_now();
      checks++;
      if (gnt !== 3'(1 << (n % 3))) begin
        failures++;
        $display("FAIL rotation step %0d gnt=%b", n, gnt);
      end
      @(posedge clk);
      #1 last = n % 3;
    end
    // random
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      req  = 3'($urandom);
      req1 = 1'($urandom);
      adv  = 1'($urandom);
      #1 check_now();
      nlast = (adv && gnt != '0) ? $clog2(gnt) : last;
      @(posedge clk);
      last = nlast;
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
