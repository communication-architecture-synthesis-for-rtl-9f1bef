// tb_sync_fifo: random pushes and pops on a blocking FIFO (default size,
// 32 x 8) against a queue model: data order, count, Full and Empty, refused
// push when full and refused pop when empty, and flush. A second,
// non-blocking FIFO must never announce Full or Empty and must return the
// data when its producer and consumer keep within its depth.
module tb_sync_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        flush, push, pop;
  logic [31:0] wdata, rdata;
  logic        full, empty;
  logic [3:0]  count;

  logic        nb_push, nb_pop;
  logic [31:0] nb_wdata, nb_rdata;
  logic        nb_full, nb_empty;
  logic [3:0]  nb_count;

  sync_fifo dut (.clk, .rst_n, .flush, .push, .wdata, .pop, .rdata, .full, .empty, .count);
  sync_fifo #(.WIDTH(32), .DEPTH(8), .BLOCKING(1'b0)) dut_nb (
    .clk, .rst_n, .flush(1'b0), .push(nb_push), .wdata(nb_wdata), .pop(nb_pop),
    .rdata(nb_rdata), .full(nb_full), .empty(nb_empty), .count(nb_count));

  logic [31:0] q[$];
  logic [31:0] nbq[$];
  int n_full = 0, n_empty_pop = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    flush = 0; push = 0; pop = 0; wdata = '0;
    nb_push = 0; nb_pop = 0; nb_wdata = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // phases that favour filling and draining
      push  = ((n / 200) % 2 == 0) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      pop   = ((n / 200) % 2 == 0) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      flush = ($urandom % 500 == 0);
      wdata = $urandom;
      #1;
      chk(count == 4'(q.size()), $sformatf("count %0d exp %0d", count, q.size()));
      chk(full == (q.size() == 8), "full");
      chk(empty == (q.size() == 0), "empty");
      if (q.size() > 0) chk(rdata == q[0], $sformatf("rdata %h exp %h", rdata, q[0]));
      if (full && push) n_full++;
      if (empty && pop) n_empty_pop++;
      @(posedge clk);
      if (flush) q.delete();
      else begin
        automatic bit can_pop = pop && q.size() > 0;
        automatic bit can_push = push && (q.size() < 8 || can_pop);
        if (can_pop) void'(q.pop_front());
        if (can_push) q.push_back(wdata);
      end
    end
    chk(n_full > 0, "full never reached");
    chk(n_empty_pop > 0, "pop on empty never tried");

    // non-blocking: producer two words ahead of the consumer at most
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      nb_push  = (nbq.size() < 6) && ($urandom % 2 == 0);
      nb_pop   = (nbq.size() > 0) && ($urandom % 2 == 0);
      nb_wdata = $urandom;
      #1;
      chk(!nb_full && !nb_empty, "non-blocking FIFO announced its state");
      if (nbq.size() > 0) chk(nb_rdata == nbq[0], "non-blocking data");
      @(posedge clk);
      if (nb_pop) void'(nbq.pop_front());
      if (nb_push) nbq.push_back(nb_wdata);
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
