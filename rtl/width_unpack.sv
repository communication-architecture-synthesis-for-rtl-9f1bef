// width_unpack: width adaptation from the FIFO word to a narrower bus.
//
// One IN_W-bit word is sent as RATIO = IN_W / OUT_W narrow beats, least
// significant part first. in_ready is high only with the last beat, so the
// word is taken from the FIFO (show-ahead) when its last part leaves: no
// extra storage is needed. Beats leave at one per clock while out_ready is
// high. flush restarts at the first part. The conversion is the document's;
// the beat order and the handshake are this design's.
module width_unpack #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 8
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

  localparam int unsigned RATIO = IN_W / OUT_W;
  localparam int unsigned IW    = (RATIO > 1) ? $clog2(RATIO) : 1;

  logic [IW-1:0] idx;
  logic          last;

  assign last      = (idx == IW'(RATIO - 1));
  assign out_valid = in_valid;
  assign out_data  = in_data[idx*OUT_W +: OUT_W];
  assign in_ready  = out_ready && last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0;
    end else if (flush) begin
      idx <= '0;
    end else if (out_valid && out_ready) begin
      idx <= last ? '0 : idx + IW'(1);
    end
  end

  initial begin
    assert (IN_W % OUT_W == 0 && IN_W >= OUT_W)
      else $error("width_unpack: IN_W must be a multiple of OUT_W");
  end

endmodule
