// tb_pci_apb_adapter: a PCI-style burst is played into the adapter, with a
// model APB slave on the target side (read data = a function of paddr).
//  * write burst of 12 words with the FIFO never empty: 12 APB writes at
//    consecutive addresses with the words in order, Psel held high through
//    the burst, one access every 2 clocks, the state alternating setup /
//    activation as in the document's waveform; Ack only once frame drops;
//  * write burst with a stalling source: the same words, slower;
//  * read burst: words pushed towards FIFO I carry the slave's data, one
//    every 3 clocks; the burst ends when frame drops;
//  * 4-phase handshake: Ack stays high until Req falls, then Libre.
module tb_pci_apb_adapter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        sel, req, ack, frame, write;
  logic [15:0] start_addr, wr_data, rd_data, paddr, pwdata, prdata;
  logic        wr_valid, wr_ready, rd_valid, rd_ready, psel, penable, pwrite;
  logic [1:0]  state;

  pci_apb_adapter dut (.clk, .rst_n, .sel, .req, .ack, .frame, .write, .start_addr,
    .wr_data, .wr_valid, .wr_ready, .rd_data, .rd_valid, .rd_ready,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .state);

  function automatic logic [15:0] slave_data(logic [15:0] a);
    return a ^ 16'h5A3C;
  endfunction
  assign prdata = slave_data(paddr);

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // APB accesses seen on the target bus
  logic [15:0] acc_addr[$], acc_data[$];
  int          acc_time[$];
  int          cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (psel && penable) begin
      acc_addr.push_back(paddr);
      acc_data.push_back(pwrite ? pwdata : prdata);
      acc_time.push_back(cyc);
    end
  end

  task automatic write_burst(int n, bit stall);
    logic [15:0] words[$];
    int pushed = 0, guard = 0;
    acc_addr.delete(); acc_data.delete(); acc_time.delete();
    for (int i = 0; i < n; i++) words.push_back(16'($urandom));
    @(negedge clk);
    frame = 1; write = 1; start_addr = 16'h3000; sel = 1; req = 1;
    while (pushed < n && guard < 2000) begin
      wr_valid = stall ? ($urandom % 3 == 0) : 1'b1;
      wr_data  = words[pushed];
      #1;
      if (psel && !stall) chk(state inside {2'd1, 2'd2}, "setup/activation during the burst");
      chk(!ack, "no Ack before the burst ends");
      if (wr_valid && wr_ready) pushed++;
      @(negedge clk);
      guard++;
    end
    wr_valid = 0;
    frame = 0;
    guard = 0;
    while (!ack && guard < 100) begin @(negedge clk); guard++; end
    chk(ack, "Ack after frame drops");
    chk(acc_addr.size() == n, $sformatf("%0d APB writes, expected %0d", acc_addr.size(), n));
    for (int i = 0; i < n && i < acc_addr.size(); i++) begin
      chk(acc_addr[i] == 16'h3000 + 16'(2 * i), "write address");
      chk(acc_data[i] == words[i], "write data");
    end
    if (!stall)
      for (int i = 1; i < acc_time.size(); i++)
        chk(acc_time[i] - acc_time[i-1] == 2, "one write every two clocks");
    repeat (2) @(negedge clk);
    chk(ack, "Ack held while Req is high");
    req = 0;
    @(negedge clk);
    @(negedge clk);
    chk(!ack && state == 2'd0 && !psel, "Libre after Req falls");
    sel = 0;
  endtask

  task automatic read_burst(int n);
    logic [15:0] got[$];
    int guard = 0;
    acc_addr.delete(); acc_data.delete(); acc_time.delete();
    @(negedge clk);
    frame = 1; write = 0; start_addr = 16'h7A00; sel = 1; req = 1; rd_ready = 1;
    while (got.size() < n && guard < 2000) begin
      #1;
      if (rd_valid && rd_ready) got.push_back(rd_data);
      @(negedge clk);
      guard++;
    end
    frame = 0;
    guard = 0;
    while (!ack && guard < 100) begin
      #1;
      if (rd_valid && rd_ready) got.push_back(rd_data);
      @(negedge clk);
      guard++;
    end
    chk(ack, "Ack after frame drops (read)");
    chk(got.size() >= n && got.size() == acc_addr.size(), "every APB read pushed");
    for (int i = 0; i < got.size(); i++)
      chk(got[i] == slave_data(16'h7A00 + 16'(2 * i)), "read data");
    for (int i = 1; i < acc_time.size(); i++)
      chk(acc_time[i] - acc_time[i-1] == 3, "one read every three clocks");
    req = 0;
    repeat (2) @(negedge clk);
    chk(!ack && state == 2'd0, "Libre after the read");
    sel = 0;
  endtask

  initial begin
    sel = 0; req = 0; frame = 0; write = 0; start_addr = '0; wr_data = '0; wr_valid = 0;
    rd_ready = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // not selected: nothing happens
    req = 1; frame = 1;
    repeat (4) begin @(negedge clk); chk(!psel && !ack, "idle when not selected"); end
    req = 0; frame = 0;
    write_burst(12, 0);
    write_burst(9, 1);
    read_burst(6);
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
