// tb_width_unpack: 16-bit words are split into 8-bit beats and 32-bit words
// into 16-bit beats, low part first. Random valid and ready; each word must
// be taken from its source only with its last beat, and an unstalled
// stream must give one beat per clock.
module tb_width_unpack;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] in16; logic v16, r16;
  logic [7:0]  out8; logic ov8, or8;
  logic [31:0] in32; logic v32, r32;
  logic [15:0] out16; logic ov16, or16;

  width_unpack dut_a (.clk, .rst_n, .flush(1'b0), .in_data(in16), .in_valid(v16), .in_ready(r16),
                      .out_data(out8), .out_valid(ov8), .out_ready(or8));
  width_unpack #(.IN_W(32), .OUT_W(16)) dut_b (.clk, .rst_n, .flush(1'b0),
                      .in_data(in32), .in_valid(v32), .in_ready(r32),
                      .out_data(out16), .out_valid(ov16), .out_ready(or16));

  logic [7:0]  ea[$];
  logic [15:0] eb[$];
  int beats_a = 0, beats_b = 0;
  bit random_mode;
  bit took_a = 0, took_b = 0;

  initial begin
    v16 = 0; v32 = 0; or8 = 0; or16 = 0; random_mode = 0;
    in16 = 16'(($urandom)); in32 = $urandom;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      random_mode = n >= 100;
      // a source keeps its word until it is taken
      if (!v16 || took_a) begin v16 = random_mode ? $urandom % 2 : 1'b1; in16 = $urandom; end
      if (!v32 || took_b) begin v32 = random_mode ? $urandom % 2 : 1'b1; in32 = $urandom; end
      or8  = random_mode ? $urandom % 2 : 1'b1;
      or16 = random_mode ? $urandom % 2 : 1'b1;
      #1;
      if (ea.size() == 0 && v16) begin ea.push_back(in16[7:0]); ea.push_back(in16[15:8]); end
      if (eb.size() == 0 && v32) begin eb.push_back(in32[15:0]); eb.push_back(in32[31:16]); end
      if (!random_mode) begin
        checks++;
        if (!ov8 || !ov16) begin
          failures++;
          $display("FAIL no beat although the source is always valid");
        end
      end
      if (ov8 && or8) begin
        checks++;
        if (ea.size() == 0 || out8 !== ea[0] || r16 !== (ea.size() == 1)) begin
          failures++;
          $display("FAIL 16->8 beat %h", out8);
        end
        if (ea.size() > 0) void'(ea.pop_front());
        beats_a++;
      end
      if (ov16 && or16) begin
        checks++;
        if (eb.size() == 0 || out16 !== eb[0] || r32 !== (eb.size() == 1)) begin
          failures++;
          $display("FAIL 32->16 beat %h", out16);
        end
        if (eb.size() > 0) void'(eb.pop_front());
        beats_b++;
      end
      took_a = v16 && r16;
      took_b = v32 && r32;
      @(posedge clk);
    end
    checks++;
    if (beats_a < 100 || beats_b < 100) begin
      failures++;
      $display("FAIL too few beats");
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
