// width_pack: width adaptation from a narrow bus to the wider FIFO word.
//
// RATIO = OUT_W / IN_W narrow beats are collected, first beat in the least
// significant bits, into one OUT_W-bit word, so a 16-bit word coming from an
// 8-bit bus is transferred "in two times". Both sides use valid/ready: a
// narrow beat is taken when in_valid && in_ready, the word leaves when
// out_valid && out_ready. The output register is the only storage, so the
// input stalls while a full word waits; the throughput is one narrow beat per
// clock. flush drops a partly assembled word. The conversion is the
// document's; the beat order and the handshake are this design's.
module width_pack #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic [IN_W-1:0]  in_data,
  input  logic             in_valid,
  output logic             in_ready,
  output logic [OUT_W-1:0] out_data,
  output logic             out_valid,
  input  logic             out_ready
);

  localparam int unsigned RATIO = OUT_W / IN_W;
  localparam int unsigned IW    = (RATIO > 1) ? $clog2(RATIO) : 1;

  logic [IW-1:0]    idx;
  logic [OUT_W-1:0] word;
  logic             full_q;

  assign in_ready  = !full_q || out_ready;
  assign out_valid = full_q;
  assign out_data  = word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx    <= '0;
      word   <= '0;
      full_q <= 1'b0;
    end else if (flush) begin
      idx    <= '0;
      full_q <= 1'b0;
    end else begin
      if (out_valid && out_ready) full_q <= 1'b0;
      if (in_valid && in_ready) begin
        word[idx*IN_W +: IN_W] <= in_data;
        if (idx == IW'(RATIO - 1)) begin
          idx    <= '0;
          full_q <= 1'b1;
        end else begin
          idx <= idx + IW'(1);
        end
      end
    end
  end

  initial begin
    assert (OUT_W % IN_W == 0 && OUT_W >= IN_W)
      else $error("width_pack: OUT_W must be a multiple of IN_W");
  end

endmodule
