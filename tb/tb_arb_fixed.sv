// tb_arb_fixed: exhaustive check of the fixed-priority arbiter for N = 2
// and N = 4: every request pattern must grant exactly the lowest-numbered
// active requester, and nothing when nobody requests.
module tb_arb_fixed;
  int checks = 0, failures = 0;

  logic [1:0] req2, gnt2;
  logic [3:0] req4, gnt4;

  arb_fixed #(.N(2)) dut2 (.req(req2), .gnt(gnt2));
  arb_fixed #(.N(4)) dut4 (.req(req4), .gnt(gnt4));

  function automatic logic [3:0] ref_gnt(logic [3:0] r);
    for (int i = 0; i < 4; i++) if (r[i]) return 4'(1 << i);
    return '0;
  endfunction

  initial begin
    for (int v = 0; v < 4; v++) begin
      req2 = 2'(v);
      #1;
      checks++;
      if (gnt2 !== 2'(ref_gnt(4'(v)))) begin
        failures++;
        $display("FAIL N=2 req=%b gnt=%b", req2, gnt2);
      end
    end
    for (int v = 0; v < 16; v++) begin
      req4 = 4'(v);
      #1;
      checks++;
      if (gnt4 !== ref_gnt(4'(v))) begin
        failures++;
        $display("FAIL N=4 req=%b gnt=%b", req4, gnt4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
