// multibus_bridge: centralized communication bridge of the two-bus SoC.
//
// Twelve components share two buses (bus1: C1, C2, C5, C7, C12; bus2: C3,
// C4, C6, C8, C9, C10, C11). One bridge serves both buses:
//  * the hierarchical arbiter (multibus_arbiter) grants each bus to its own
//    masters concurrently (internal communication) and, when no internal
//    request is pending, grants a master both buses for a cross-bus
//    transfer (external communication);
//  * an address decoder per bus drives the chip selects of that bus and
//    flags addresses that belong to no component;
//  * for an external transfer the control unit checks the destination,
//    sets the mux/demux of the data path and hands the transfer to the
//    adapter of the target bus with a 4-phase Req/Ack handshake;
//  * the data path carries write data through FIFO O and read data through
//    FIFO I; FIFO words are bwQ = max(bus1 width, bus2 width) bits and the
//    narrower bus is adapted by width_pack / width_unpack;
//  * bus1 masters speak a PCI-style protocol (frame); a bus1 -> bus2
//    transfer is carried out on bus2 by pci_apb_adapter as APB cycles. bus2
//    masters speak a PI-bus-style protocol (master_size, master_items,
//    master_wr); a bus2 -> bus1 transfer is carried out on bus1 by
//    pibus_apb_adapter, whose LOCK masks new requests on bus1 during the
//    burst.
//
// A master Ci asks for bus j with req[j][i] (R_i^j) and holds it until its
// transfer is over; gnt[j][i] (G_i^j) answers. While granted it drives its
// target address on bus_addr of its own bus. For an external transfer it
// then streams write words into m_wdata/m_wvalid (m_wready) or takes read
// words from m_rdata/m_rvalid (m_rready) on its own bus, low bits used on
// the narrow bus, with frame (bus1) or master_size/items/wr (bus2)
// describing the burst. The APB ports are the bridge's master side on each
// bus. Internal transfers use the bus directly; the bridge only arbitrates
// and decodes for them.
// Some output bits are constant by construction: the upper half of the
// bus2 data outputs (bus2 is narrower than the FIFO word) and the chip
// selects a bus never drives (components of the other bus).
// Reset is asynchronous and active low in every block. The assertions are
// disabled during reset with `disable iff (!rst_n)`, which makes a lint tool
// report rst_n as used both synchronously and asynchronously; no flip-flop
// uses it synchronously.
// The block structure follows the document; the port protocols of the
// masters, the APB target side, the widths and the address map are this
// design's (see the README).
module multibus_bridge
  import bridge_pkg::*;
#(
  parameter int unsigned          BUS1_W     = 32,
  parameter int unsigned          BUS2_W     = 16,
  parameter int unsigned          FIFO_DEPTH = 8,
  parameter logic [NCOMP-1:0]     BUS_OF     = EX_BUS_OF,
  parameter logic [NCOMP*LVL_W-1:0] INT_LEVEL = EX_INT_LEVEL,
  parameter logic [NCOMP*LVL_W-1:0] EXT_LEVEL = EX_EXT_LEVEL,
  parameter logic [NCOMP*ADDR_W-1:0] BASE     = EX_BASE,
  parameter logic [NCOMP*ADDR_W-1:0] LIMIT    = EX_LIMIT,
  // FIFO word width: bwQ = max(bw_bus1, bw_bus2)
  localparam int unsigned         QW = (BUS1_W > BUS2_W) ? BUS1_W : BUS2_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // arbitration
  input  logic [NBUS-1:0][NCOMP-1:0]  req,
  input  logic [NBUS-1:0]             mask_reqs,
  output logic [NBUS-1:0][NCOMP-1:0]  gnt,
  // address bus of each bus and its decode
  input  logic [NBUS-1:0][ADDR_W-1:0] bus_addr,
  output logic [NBUS-1:0][NCOMP-1:0]  bus_cs,
  output logic [NBUS-1:0]             bus_illegal,
  // bus1 initiator (PCI-style)
  input  logic                        pci_frame,
  input  logic                        pci_write,
  // bus2 initiator (PI-bus-style)
  input  logic [1:0]                  pi_master_size,
  input  logic [1:0]                  pi_master_items,
  input  logic                        pi_master_wr,
  output logic                        pi_lock,
  output logic [3:0]                  pi_count,
  // initiator data streams, one per bus
  input  logic [NBUS-1:0][QW-1:0]     m_wdata,
  input  logic [NBUS-1:0]             m_wvalid,
  output logic [NBUS-1:0]             m_wready,
  output logic [NBUS-1:0][QW-1:0]     m_rdata,
  output logic [NBUS-1:0]             m_rvalid,
  input  logic [NBUS-1:0]             m_rready,
  // APB master side of the bridge on each bus
  output logic [NBUS-1:0]             apb_psel,
  output logic [NBUS-1:0]             apb_penable,
  output logic [NBUS-1:0]             apb_pwrite,
  output logic [NBUS-1:0][ADDR_W-1:0] apb_paddr,
  output logic [NBUS-1:0][QW-1:0]     apb_pwdata,
  input  logic [NBUS-1:0][QW-1:0]     apb_prdata,
  // control unit status
  output logic                        illegal_address,
  output cu_state_e                   cu_state,
  output logic [1:0]                  pci_state,
  output logic [1:0]                  pi_state,
  output logic [NCOMP-1:0]            ext_gnt,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fo_count,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fi_count
);

  localparam int unsigned BW [NBUS] = '{BUS1_W, BUS2_W};

  // ---- arbiter ------------------------------------------------------------------
  logic              ext_valid, ext_init_bus, ext_tgt_bus;
  logic [NBUS-1:0]   mask_eff;

  assign mask_eff = mask_reqs | {1'b0, pi_lock};   // LOCK holds bus1 (the PI adapter's target)

  multibus_arbiter #(
    .NC(NCOMP), .BUS_OF(BUS_OF), .INT_LEVEL(INT_LEVEL), .EXT_LEVEL(EXT_LEVEL)
  ) u_arbiter (
    .clk, .rst_n,
    .req, .mask_reqs(mask_eff), .gnt,
    .ext_valid, .ext_gnt, .ext_init_bus, .ext_tgt_bus
  );

  // ---- address decoders, one per bus -------------------------------------------------
  logic [NBUS-1:0]                    dec_valid, dec_bus;
  logic [NBUS-1:0][ADDR_W-1:0]        dec_addr;
  logic [NBUS-1:0][$clog2(NCOMP)-1:0] dec_idx;
  logic [NBUS-1:0][NCOMP-1:0]         dec_cs;

  for (genvar j = 0; j < NBUS; j++) begin : g_dec
    // the bridge's own APB cycle owns the address bus while Psel is high
    assign dec_addr[j]  = apb_psel[j] ? apb_paddr[j] : bus_addr[j];
    assign dec_valid[j] = apb_psel[j] || (gnt[j] != '0);
    addr_decoder #(
      .NC(NCOMP), .AW(ADDR_W), .BASE(BASE), .LIMIT(LIMIT), .BUS_OF(BUS_OF)
    ) u_dec (
      .valid          (dec_valid[j]),
      .addr           (dec_addr[j]),
      .cs             (dec_cs[j]),
      .illegal_address(bus_illegal[j]),
      .dest_bus       (dec_bus[j]),
      .hit_idx        (dec_idx[j])
    );
    // a chip select only reaches components of this bus
    for (genvar i = 0; i < NCOMP; i++) begin : g_cs
      assign bus_cs[j][i] = dec_cs[j][i] && (int'(BUS_OF[i]) == j);
    end
    // the decoder's index and its chip select name the same component
    a_idx_matches_cs: assert property (@(posedge clk) disable iff (!rst_n)
                                       (dec_cs[j] != '0) |-> dec_cs[j][dec_idx[j]]);
  end

  // ---- control unit ---------------------------------------------------------------------
  logic            cu_req, cu_flush, route_en, ack;
  logic [NBUS-1:0] adapter_sel, adapter_ack;
  logic [2:0]      cu_word;
  logic            init_write;

  assign init_write = ext_init_bus ? pi_master_wr : pci_write;
  assign ack        = |adapter_ack;

  control_unit #(.NB(NBUS)) u_cu (
    .clk, .rst_n,
    .ext_valid,
    .ext_init_bus,
    .ext_tgt_bus,
    .dec_illegal    (bus_illegal[ext_init_bus]),
    .dec_bus        (dec_bus[ext_init_bus]),
    .init_write,
    .ack,
    .req            (cu_req),
    .adapter_sel,
    .cu             (cu_word),
    .route_en,
    .flush          (cu_flush),
    .illegal_address,
    .state          (cu_state)
  );

  // ---- data path --------------------------------------------------------------------------
  logic [NBUS-1:0][QW-1:0] dp_i_wdata, dp_i_rdata, dp_t_wdata, dp_t_rdata;
  logic [NBUS-1:0]         dp_i_wvalid, dp_i_wready, dp_i_rvalid, dp_i_rready;
  logic [NBUS-1:0]         dp_t_wvalid, dp_t_wready, dp_t_rvalid, dp_t_rready;

  bridge_datapath #(.NB(NBUS), .QW(QW), .DEPTH(FIFO_DEPTH)) u_datapath (
    .clk, .rst_n,
    .flush   (cu_flush),
    .route_en,
    .cu      (cu_word),
    .i_wdata (dp_i_wdata), .i_wvalid(dp_i_wvalid), .i_wready(dp_i_wready),
    .i_rdata (dp_i_rdata), .i_rvalid(dp_i_rvalid), .i_rready(dp_i_rready),
    .t_wdata (dp_t_wdata), .t_wvalid(dp_t_wvalid), .t_wready(dp_t_wready),
    .t_rdata (dp_t_rdata), .t_rvalid(dp_t_rvalid), .t_rready(dp_t_rready),
    .fo_count,
    .fi_count
  );

  // ---- width adaptation of each bus port -----------------------------------------------
  // target-side streams as seen by the adapters, in bus width (low bits)
  logic [NBUS-1:0][QW-1:0] tw_data, tr_data;
  logic [NBUS-1:0]         tw_valid, tw_ready, tr_valid, tr_ready;

  for (genvar j = 0; j < NBUS; j++) begin : g_width
    if (BW[j] == QW) begin : g_same
      assign dp_i_wdata[j]  = m_wdata[j];
      assign dp_i_wvalid[j] = m_wvalid[j];
      assign m_wready[j]    = dp_i_wready[j];
      assign m_rdata[j]     = dp_i_rdata[j];
      assign m_rvalid[j]    = dp_i_rvalid[j];
      assign dp_i_rready[j] = m_rready[j];
      assign tw_data[j]     = dp_t_wdata[j];
      assign tw_valid[j]    = dp_t_wvalid[j];
      assign dp_t_wready[j] = tw_ready[j];
      assign dp_t_rdata[j]  = tr_data[j];
      assign dp_t_rvalid[j] = tr_valid[j];
      assign tr_ready[j]    = dp_t_rready[j];
    end else begin : g_narrow
      localparam int unsigned W = BW[j];
      logic [W-1:0] m_rd_n, tw_n;

      width_pack #(.IN_W(W), .OUT_W(QW)) u_i_pack (
        .clk, .rst_n, .flush(cu_flush),
        .in_data (m_wdata[j][W-1:0]), .in_valid(m_wvalid[j]), .in_ready(m_wready[j]),
        .out_data(dp_i_wdata[j]), .out_valid(dp_i_wvalid[j]), .out_ready(dp_i_wready[j])
      );
      width_unpack #(.IN_W(QW), .OUT_W(W)) u_i_unpack (
        .clk, .rst_n, .flush(cu_flush),
        .in_data (dp_i_rdata[j]), .in_valid(dp_i_rvalid[j]), .in_ready(dp_i_rready[j]),
        .out_data(m_rd_n), .out_valid(m_rvalid[j]), .out_ready(m_rready[j])
      );
      assign m_rdata[j] = QW'(m_rd_n);

      width_unpack #(.IN_W(QW), .OUT_W(W)) u_t_unpack (
        .clk, .rst_n, .flush(cu_flush),
        .in_data (dp_t_wdata[j]), .in_valid(dp_t_wvalid[j]), .in_ready(dp_t_wready[j]),
        .out_data(tw_n), .out_valid(tw_valid[j]), .out_ready(tw_ready[j])
      );
      assign tw_data[j] = QW'(tw_n);

      width_pack #(.IN_W(W), .OUT_W(QW)) u_t_pack (
        .clk, .rst_n, .flush(cu_flush),
        .in_data (tr_data[j][W-1:0]), .in_valid(tr_valid[j]), .in_ready(tr_ready[j]),
        .out_data(dp_t_rdata[j]), .out_valid(dp_t_rvalid[j]), .out_ready(dp_t_rready[j])
      );
    end
  end

  // ---- adapters -----------------------------------------------------------------------------
  // target bus1: bus2 (PI-bus-style) master -> APB on bus1
  logic [BUS1_W-1:0] pi_rd_data, pi_pwdata;
  pibus_apb_adapter #(.DW(BUS1_W), .AW(ADDR_W)) u_pi_adapter (
    .clk, .rst_n,
    .sel         (adapter_sel[0]),
    .req         (cu_req),
    .ack         (adapter_ack[0]),
    .master_size (pi_master_size),
    .master_items(pi_master_items),
    .master_wr   (pi_master_wr),
    .start_addr  (bus_addr[1]),
    .wr_data     (tw_data[0][BUS1_W-1:0]),
    .wr_valid    (tw_valid[0]),
    .wr_ready    (tw_ready[0]),
    .rd_data     (pi_rd_data),
    .rd_valid    (tr_valid[0]),
    .rd_ready    (tr_ready[0]),
    .psel        (apb_psel[0]),
    .penable     (apb_penable[0]),
    .pwrite      (apb_pwrite[0]),
    .paddr       (apb_paddr[0]),
    .pwdata      (pi_pwdata),
    .prdata      (apb_prdata[0][BUS1_W-1:0]),
    .lock        (pi_lock),
    .count       (pi_count),
    .state       (pi_state)
  );
  assign tr_data[0]    = QW'(pi_rd_data);
  assign apb_pwdata[0] = QW'(pi_pwdata);

  // target bus2: bus1 (PCI-style) master -> APB on bus2
  logic [BUS2_W-1:0] pci_rd_data, pci_pwdata;
  pci_apb_adapter #(.DW(BUS2_W), .AW(ADDR_W)) u_pci_adapter (
    .clk, .rst_n,
    .sel       (adapter_sel[1]),
    .req       (cu_req),
    .ack       (adapter_ack[1]),
    .frame     (pci_frame),
    .write     (pci_write),
    .start_addr(bus_addr[0]),
    .wr_data   (tw_data[1][BUS2_W-1:0]),
    .wr_valid  (tw_valid[1]),
    .wr_ready  (tw_ready[1]),
    .rd_data   (pci_rd_data),
    .rd_valid  (tr_valid[1]),
    .rd_ready  (tr_ready[1]),
    .psel      (apb_psel[1]),
    .penable   (apb_penable[1]),
    .pwrite    (apb_pwrite[1]),
    .paddr     (apb_paddr[1]),
    .pwdata    (pci_pwdata),
    .prdata    (apb_prdata[1][BUS2_W-1:0]),
    .state     (pci_state)
  );
  assign tr_data[1]    = QW'(pci_rd_data);
  assign apb_pwdata[1] = QW'(pci_pwdata);

endmodule
