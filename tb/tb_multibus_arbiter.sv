// tb_multibus_arbiter: the hierarchical arbiter with the example system's
// priority tables. Components are modelled as masters that raise R_i^j,
// wait for G_i^j, keep the bus a few clocks and release it. Scenarios:
//  * bus1 alone: C1, C2, C5, C7, C12 all ask; order C1, C2, C7 (round
//    robin among equals) then C5, then C12 (fixed priority below them),
//    and a second round continues the rotation;
//  * bus2 alone: C10, then C3 (C3 = C6), then C4, C9 (C4 = C9 = C11), C8;
//  * bus1 and bus2 granted in the same clock (concurrent internal levels);
//  * an external request waits while an internal one is pending, and
//    external requests are ordered C4 before C1 before C3;
//  * Mask-Reqs blocks new grants on its bus;
//  * a grant comes one clock after a request on an idle bus.
module tb_multibus_arbiter;
  import bridge_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0][11:0] req, gnt;
  logic [1:0]       mask_reqs;
  logic             ext_valid, ext_init_bus, ext_tgt_bus;
  logic [11:0]      ext_gnt;

  multibus_arbiter dut (.clk, .rst_n, .req, .mask_reqs, .gnt, .ext_valid, .ext_gnt,
                        .ext_init_bus, .ext_tgt_bus);

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  int order[$];        // component numbers in grant order
  int gtime[13];       // clock of the last grant of each component

  // master Ck asks for bus `b`, keeps it `hold` clocks once granted
  task automatic master(int k, int b, int hold);
    int i = k - 1;
    int t0;
    @(negedge clk);
    req[b][i] = 1'b1;
    t0 = cyc;
    while (!gnt[b][i] && cyc - t0 < 400) @(negedge clk);
    chk(gnt[b][i], $sformatf("C%0d granted bus%0d", k, b + 1));
    order.push_back(k);
    gtime[k] = cyc;
    if (b != int'(EX_BUS_OF[i])) begin
      chk(ext_valid && ext_gnt[i] && ext_init_bus == EX_BUS_OF[i] && ext_tgt_bus == 1'(b),
          "external grant reported to the control unit");
    end
    repeat (hold) @(negedge clk);
    req[b][i] = 1'b0;
    @(negedge clk);
    chk(!gnt[b][i], "grant released after the request falls");
  endtask

  task automatic expect_order(int exp[$], string what);
    chk(order == exp, $sformatf("%s: order %p expected %p", what, order, exp));
    order.delete();
  endtask

  initial begin
    req = '0; mask_reqs = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // latency: one clock
    fork
      master(5, 0, 1);
      begin
        @(negedge clk);
        @(negedge clk);
        chk(gnt[0][4], "grant one clock after the request");
      end
    join
    order.delete();

    // bus1 ordering
    fork
      master(1, 0, 2); master(2, 0, 2); master(5, 0, 2); master(7, 0, 2); master(12, 0, 2);
    join
    expect_order('{1, 2, 7, 5, 12}, "bus1 round 1");
    fork master(1, 0, 1); master(7, 0, 1); master(5, 0, 1); join
    expect_order('{1, 7, 5}, "bus1 round 2");
    fork master(2, 0, 1); master(7, 0, 1); master(1, 0, 1); join
    expect_order('{1, 2, 7}, "bus1 round 3 continues after C7");

    // bus2 ordering
    fork
      master(8, 1, 2); master(4, 1, 2); master(9, 1, 2); master(3, 1, 2); master(10, 1, 2);
    join
    expect_order('{10, 3, 4, 9, 8}, "bus2");

    // concurrency of the internal level
    fork master(2, 0, 3); master(10, 1, 3); join
    chk(gtime[2] == gtime[10], "bus1 and bus2 granted in the same clock");
    order.delete();

    // internal before external: C7 wants bus2 while C3 uses it and C6 waits
    fork
      master(3, 1, 4);
      begin @(negedge clk); master(7, 1, 2); end
      begin @(negedge clk); master(6, 1, 2); end
    join
    expect_order('{3, 6, 7}, "internal C3, C6 before external C7");

    // external priority: C4 (highest) > C1 > C3
    fork master(3, 0, 2); master(1, 1, 2); master(4, 0, 2); join
    expect_order('{4, 1, 3}, "external order");

    // an external transfer holds both buses: C2 (bus1) waits for C11's transfer
    fork
      master(11, 0, 5);
      begin repeat (2) @(negedge clk); master(2, 0, 1); end
    join
    chk(gtime[2] > gtime[11] + 5, "bus1 busy during the external transfer");
    order.delete();

    // Mask-Reqs
    @(negedge clk);
    mask_reqs = 2'b01;
    fork
      master(12, 0, 1);
      master(9, 1, 1);
      begin
        repeat (6) begin
          @(negedge clk);
          chk(!gnt[0][11], "no grant on bus1 while Mask-Reqs is high");
        end
        chk(order.size() == 1 && order[0] == 9, "bus2 not masked");
        mask_reqs = 2'b00;
      end
    join
    expect_order('{9, 12}, "bus1 served after Mask-Reqs falls");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
