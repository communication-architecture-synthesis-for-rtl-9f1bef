// tb_pibus_apb_adapter: PI-bus-style bursts of every (master_items,
// master_size) pair, written and read, through the adapter to a model APB
// slave. For each burst: the number of APB beats is {items, size} + 1,
// Count starts at {items, size} and falls by one per beat, LOCK is high
// exactly while Count is not zero, states 01 (setup) and 10 (access)
// alternate, each beat takes three clocks when data is ready, write data
// and addresses are in order, read data reaches FIFO I, Ack follows the
// last beat and falls after Req.
module tb_pibus_apb_adapter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        sel, req, ack, master_wr, lock;
  logic [1:0]  master_size, master_items, state;
  logic [3:0]  count;
  logic [15:0] start_addr, paddr;
  logic [31:0] wr_data, rd_data, pwdata, prdata;
  logic        wr_valid, wr_ready, rd_valid, rd_ready, psel, penable, pwrite;

  pibus_apb_adapter dut (.clk, .rst_n, .sel, .req, .ack, .master_size, .master_items, .master_wr,
    .start_addr, .wr_data, .wr_valid, .wr_ready, .rd_data, .rd_valid, .rd_ready,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .lock, .count, .state);

  function automatic logic [31:0] slave_data(logic [15:0] a);
    return {a, ~a};
  endfunction
  assign prdata = slave_data(paddr);

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  int lock_cycles = 0;

  task automatic burst(logic [1:0] items, logic [1:0] size, logic wr);
    int beats = int'({items, size}) + 1;
    logic [31:0] words[$], got[$];
    logic [15:0] addrs[$];
    int times[$];
    int pushed = 0, guard = 0, cyc = 0, exp_count;
    for (int i = 0; i < beats; i++) words.push_back($urandom);
    @(negedge clk);
    master_items = items; master_size = size; master_wr = wr; start_addr = 16'h2400;
    sel = 1; req = 1; rd_ready = 1;
    exp_count = beats - 1;
    while (!ack && guard < 500) begin
      wr_valid = wr && (pushed < beats);
      wr_data  = words[pushed];
      #1;
      if (guard > 0) begin
        chk(count == 4'(exp_count), $sformatf("Count %0d expected %0d", count, exp_count));
        chk(lock == (count != 0), "LOCK while Count is not zero");
        if (lock) lock_cycles++;
      end
      if (psel && penable) begin
        addrs.push_back(paddr);
        times.push_back(cyc);
        chk(state == 2'b10, "access state is 10");
        if (wr) got.push_back(pwdata);
        if (exp_count > 0) exp_count--;
      end else if (psel) chk(state == 2'b01, "setup state is 01");
      if (rd_valid && rd_ready) got.push_back(rd_data);
      if (wr_valid && wr_ready) pushed++;
      @(negedge clk);
      guard++;
      cyc++;
    end
    chk(ack && state == 2'b11, "Ack after the last beat");
    chk(addrs.size() == beats, $sformatf("%0d beats, expected %0d", addrs.size(), beats));
    for (int i = 0; i < addrs.size(); i++) begin
      chk(addrs[i] == 16'h2400 + 16'(4 * i), "beat address");
      if (i < got.size())
        chk(got[i] == (wr ? words[i] : slave_data(addrs[i])), "beat data");
      if (i > 0) chk(times[i] - times[i-1] == 3, "one beat every three clocks");
    end
    chk(got.size() == beats, "every beat's data transferred");
    req = 0;
    repeat (2) @(negedge clk);
    chk(!ack && state == 2'b00 && !lock, "idle after Req falls");
    sel = 0; wr_valid = 0;
  endtask

  initial begin
    sel = 0; req = 0; master_wr = 0; master_size = 0; master_items = 0; start_addr = '0;
    wr_data = '0; wr_valid = 0; rd_ready = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int it = 0; it < 4; it++)
      for (int sz = 0; sz < 4; sz++) begin
        burst(2'(it), 2'(sz), 1'b1);
        burst(2'(it), 2'(sz), 1'b0);
      end
    chk(lock_cycles > 0, "LOCK was never raised");
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
