// tb_bridge_datapath: three-bus data path (the CU[4:0] case). For several
// control words cu = {init_sel, tgt_sel, write} a stream of words is sent
// from the initiator bus through FIFO O to the target bus (write) or from
// the target bus through FIFO I to the initiator bus (read), with random
// valid and ready on both sides. Checks: data order, that only the
// selected ports move, that FIFO O holds off the initiator when full
// (blocking protocol), that nothing moves while route_en is low, and flush.
module tb_bridge_datapath;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NB = 3;
  logic                  flush, route_en;
  logic [4:0]            cu;
  logic [NB-1:0][31:0]   i_wdata, i_rdata, t_wdata, t_rdata;
  logic [NB-1:0]         i_wvalid, i_wready, i_rvalid, i_rready;
  logic [NB-1:0]         t_wvalid, t_wready, t_rvalid, t_rready;
  logic [3:0]            fo_count, fi_count;

  bridge_datapath dut (.clk, .rst_n, .flush, .route_en, .cu,
    .i_wdata, .i_wvalid, .i_wready, .i_rdata, .i_rvalid, .i_rready,
    .t_wdata, .t_wvalid, .t_wready, .t_rdata, .t_rvalid, .t_rready,
    .fo_count, .fi_count);

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  int full_seen = 0;

  // send `n` words from the source side to the sink side
  task automatic run(int ib, int tb, bit wr, int n, bit stall_sink);
    logic [31:0] q[$];
    int sent = 0, got = 0, cycles = 0;
    @(negedge clk);
    cu = {2'(ib), 2'(tb), wr};
    route_en = 1;
    while (got < n && cycles < 5000) begin
      logic src_v, snk_r;
      logic [31:0] d;
      @(negedge clk);
      cycles++;
      src_v = (sent < n) && ($urandom % 4 != 0);
      snk_r = stall_sink ? (cycles > 40 && $urandom % 2 == 0) : ($urandom % 4 != 0);
      d = $urandom;
      i_wvalid = '0; i_rready = '0; t_wready = '0; t_rvalid = '0;
      for (int j = 0; j < NB; j++) begin i_wdata[j] = $urandom; t_rdata[j] = $urandom; end
      if (wr) begin
        i_wvalid[ib] = src_v; i_wdata[ib] = d; t_wready[tb] = snk_r;
        // a port that is not selected must not see a word
        for (int j = 0; j < NB; j++) if (j != tb) t_wready[j] = 1'b1;
      end else begin
        t_rvalid[tb] = src_v; t_rdata[tb] = d; i_rready[ib] = snk_r;
        for (int j = 0; j < NB; j++) if (j != ib) i_rready[j] = 1'b1;
      end
      #1;
      for (int j = 0; j < NB; j++) begin
        if (wr) begin
          if (j != tb) chk(!t_wvalid[j], "write word on a target port not selected");
          if (j != ib) chk(!i_wready[j], "ready on an initiator port not selected");
          chk(!i_rvalid[j] && !t_rready[j], "read path active during a write");
        end else begin
          if (j != ib) chk(!i_rvalid[j], "read word on an initiator port not selected");
          if (j != tb) chk(!t_rready[j], "ready on a target port not selected");
          chk(!t_wvalid[j] && !i_wready[j], "write path active during a read");
        end
      end
      if (wr) begin
        if (!i_wready[ib]) begin chk(fo_count == 8, "initiator held off only when FIFO O is full"); full_seen++; end
        if (i_wvalid[ib] && i_wready[ib]) begin q.push_back(d); sent++; end
        if (t_wvalid[tb] && t_wready[tb]) begin
          chk(q.size() > 0 && t_wdata[tb] == q[0], "write data order");
          if (q.size() > 0) void'(q.pop_front());
          got++;
        end
      end else begin
        if (!t_rready[tb]) begin chk(fi_count == 8, "target held off only when FIFO I is full"); full_seen++; end
        if (t_rvalid[tb] && t_rready[tb]) begin q.push_back(d); sent++; end
        if (i_rvalid[ib] && i_rready[ib]) begin
          chk(q.size() > 0 && i_rdata[ib] == q[0], "read data order");
          if (q.size() > 0) void'(q.pop_front());
          got++;
        end
      end
    end
    chk(got == n, $sformatf("transfer cu=%b finished (%0d of %0d)", cu, got, n));
    @(negedge clk);
    i_wvalid = '0; i_rready = '0; t_wready = '0; t_rvalid = '0;
    route_en = 0;
  endtask

  initial begin
    flush = 0; route_en = 0; cu = '0;
    i_wdata = '0; i_wvalid = '0; i_rready = '0; t_wready = '0; t_rdata = '0; t_rvalid = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(2, 0, 1, 40, 0);
    run(0, 1, 0, 40, 0);
    run(1, 2, 1, 30, 1);   // sink stalls: FIFO O fills
    run(2, 1, 0, 30, 1);   // FIFO I fills
    run(0, 2, 1, 20, 0);
    chk(full_seen > 0, "a FIFO was never full");
    // route_en low: nothing moves
    @(negedge clk);
    cu = {2'd0, 2'd1, 1'b1};
    i_wvalid = '1; t_wready = '1; t_rvalid = '1; i_rready = '1;
    #1 chk(i_wready == '0 && t_wvalid == '0 && t_rready == '0 && i_rvalid == '0, "idle without route_en");
    @(negedge clk);
    chk(fo_count == 0 && fi_count == 0, "no word stored without route_en");
    // flush
    route_en = 1; t_wready = '0;
    repeat (3) @(negedge clk);
    chk(fo_count == 3, "three words stored");
    flush = 1;
    @(negedge clk);
    flush = 0; route_en = 0; i_wvalid = '0;
    chk(fo_count == 0, "flush empties FIFO O");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
