// tb_width_pack: an 8-bit stream is packed into 16-bit words (the
// document's 16-bit / 8-bit example: one word in two transfers) and a
// 16-bit stream into 32-bit words. Random valid and ready; every word must
// hold its beats in order, first beat in the low bits, and an unstalled
// input must be taken at one beat per clock.
module tb_width_pack;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]  in8;  logic v8, r8;
  logic [15:0] out16; logic ov16, or16;
  logic [15:0] in16; logic v16, r16;
  logic [31:0] out32; logic ov32, or32;

  width_pack dut_a (.clk, .rst_n, .flush(1'b0), .in_data(in8), .in_valid(v8), .in_ready(r8),
                    .out_data(out16), .out_valid(ov16), .out_ready(or16));
  width_pack #(.IN_W(16), .OUT_W(32)) dut_b (.clk, .rst_n, .flush(1'b0),
                    .in_data(in16), .in_valid(v16), .in_ready(r16),
                    .out_data(out32), .out_valid(ov32), .out_ready(or32));

  logic [7:0]  qa[$];
  logic [15:0] qb[$];
  int words_a = 0, words_b = 0;
  bit random_mode;

  initial begin
    v8 = 0; v16 = 0; or16 = 0; or32 = 0; in8 = '0; in16 = '0; random_mode = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      random_mode = n >= 100;
      v8   = random_mode ? $urandom % 2 : 1'b1;
      or16 = random_mode ? $urandom % 2 : 1'b1;
      v16  = random_mode ? $urandom % 2 : 1'b1;
      or32 = random_mode ? $urandom % 2 : 1'b1;
      in8  = $urandom;
      in16 = $urandom;
      #1;
      if (!random_mode) begin
        checks++;
        if (!r8 || !r16) begin
          failures++;
          $display("FAIL input stalled although output is always ready");
        end
      end
      if (ov16 && or16) begin
        checks++;
        if (qa.size() < 2 || out16 !== {qa[1], qa[0]}) begin
          failures++;
          $display("FAIL 8->16 word %h", out16);
        end
        if (qa.size() >= 2) begin void'(qa.pop_front()); void'(qa.pop_front()); end
        words_a++;
      end
      if (ov32 && or32) begin
        checks++;
        if (qb.size() < 2 || out32 !== {qb[1], qb[0]}) begin
          failures++;
          $display("FAIL 16->32 word %h", out32);
        end
        if (qb.size() >= 2) begin void'(qb.pop_front()); void'(qb.pop_front()); end
        words_b++;
      end
      if (v8 && r8) qa.push_back(in8);
      if (v16 && r16) qb.push_back(in16);
      @(posedge clk);
    end
    checks++;
    if (words_a < 100 || words_b < 100) begin
      failures++;
      $display("FAIL too few words %0d %0d", words_a, words_b);
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
