// bridge_datapath: data path of the centralized bridge.
//
// Two FIFOs sit between two multiplexer/demultiplexer stages. The initiator
// stage connects the FIFOs to the bus of the master that owns the transfer,
// the target stage to the bus of the addressed slave:
//   write: initiator bus -> FIFO O -> target bus
//   read : target bus   -> FIFO I -> initiator bus
// The control word cu = {init_sel, tgt_sel, write} comes from the control
// unit; with three buses it is five bits wide (CU[4:0]). route_en opens the
// path; while it is low every bus port is idle. Each bus port is a pair of
// valid/ready streams of one FIFO word (QW bits, the width of the widest
// bus); narrower buses are adapted outside by width_pack / width_unpack.
// FIFOs use the blocking protocol. The structure (two FIFOs, four
// mux/demux) is the document's; the split of the control word and the
// stream handshakes are this design's.
module bridge_datapath #(
  parameter int unsigned NB    = 3,
  parameter int unsigned QW    = 32,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned SW   = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  flush,
  input  logic                  route_en,
  input  logic [2*SW:0]         cu,
  // initiator side: writes into FIFO O, reads from FIFO I
  input  logic [NB-1:0][QW-1:0] i_wdata,
  input  logic [NB-1:0]         i_wvalid,
  output logic [NB-1:0]         i_wready,
  output logic [NB-1:0][QW-1:0] i_rdata,
  output logic [NB-1:0]         i_rvalid,
  input  logic [NB-1:0]         i_rready,
  // target side: reads from FIFO O, writes into FIFO I
  output logic [NB-1:0][QW-1:0] t_wdata,
  output logic [NB-1:0]         t_wvalid,
  input  logic [NB-1:0]         t_wready,
  input  logic [NB-1:0][QW-1:0] t_rdata,
  input  logic [NB-1:0]         t_rvalid,
  output logic [NB-1:0]         t_rready,
  // FIFO levels
  output logic [$clog2(DEPTH+1)-1:0] fo_count,
  output logic [$clog2(DEPTH+1)-1:0] fi_count
);

  logic [SW-1:0] init_sel, tgt_sel;
  logic          write;
  assign {init_sel, tgt_sel, write} = cu;

  logic          wr_path, rd_path;
  assign wr_path = route_en &&  write;
  assign rd_path = route_en && !write;

  logic [QW-1:0] fo_wdata, fo_rdata, fi_wdata, fi_rdata;
  logic          fo_push, fo_pop, fo_full, fo_empty;
  logic          fi_push, fi_pop, fi_full, fi_empty;

  // ---- initiator-side mux/demux ----------------------------------------------
  always_comb begin
    for (int j = 0; j < int'(NB); j++) begin
      i_wready[j] = wr_path && (SW'(j) == init_sel) && !fo_full;
      i_rvalid[j] = rd_path && (SW'(j) == init_sel) && !fi_empty;
      i_rdata[j]  = (SW'(j) == init_sel) ? fi_rdata : '0;
    end
    fo_wdata = i_wdata[init_sel];
    fo_push  = wr_path && i_wvalid[init_sel] && !fo_full;
    fi_pop   = rd_path && i_rready[init_sel] && !fi_empty;
  end

  // ---- target-side mux/demux -------------------------------------------------
  always_comb begin
    for (int j = 0; j < int'(NB); j++) begin
      t_wvalid[j] = wr_path && (SW'(j) == tgt_sel) && !fo_empty;
      t_wdata[j]  = (SW'(j) == tgt_sel) ? fo_rdata : '0;
      t_rready[j] = rd_path && (SW'(j) == tgt_sel) && !fi_full;
    end
    fo_pop   = wr_path && t_wready[tgt_sel] && !fo_empty;
    fi_wdata = t_rdata[tgt_sel];
    fi_push  = rd_path && t_rvalid[tgt_sel] && !fi_full;
  end

  sync_fifo #(.WIDTH(QW), .DEPTH(DEPTH), .BLOCKING(1'b1)) u_fifo_o (
    .clk, .rst_n, .flush,
    .push(fo_push), .wdata(fo_wdata),
    .pop (fo_pop),  .rdata(fo_rdata),
    .full(fo_full), .empty(fo_empty), .count(fo_count)
  );

  sync_fifo #(.WIDTH(QW), .DEPTH(DEPTH), .BLOCKING(1'b1)) u_fifo_i (
    .clk, .rst_n, .flush,
    .push(fi_push), .wdata(fi_wdata),
    .pop (fi_pop),  .rdata(fi_rdata),
    .full(fi_full), .empty(fi_empty), .count(fi_count)
  );

endmodule
