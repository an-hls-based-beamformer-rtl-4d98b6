// bf_top: one B-engine card of the beamformer, plus the HLS example kernels.
//
// The beamformer chain (one Alveo card) takes SPEAD packets from the 100G
// network, each holding one channel of one array element, and returns
// SPEAD packets each holding one channel of one beam:
//
//   network in -> spead_recv -> reorder <-> buffer memory (HBM)
//              -> corner_turner -> beamformer (weights loaded by the host)
//              -> corner_turner2 -> spead_send -> network out
//
// Data orders along the chain: per packet (T, F, E, T) out of reorder,
// (T, F, T, E) into the beamformer, (T, F, T, B) out of it and (T, F, B, T)
// into spead_send (T: coarse time slot, F: channel, E: element, B: beam, and
// the last T the samples inside a packet). Every link is a 512-bit
// AXI4-Stream with a 128-bit side channel {timestamp, channel, element or
// beam}.
//
// Parts that the card provides rather than this design are brought out as
// ports: the network kernel's streams (net_rx_*, net_tx_*), the reorder
// buffer memory (hbm_*) and the host's weight loading (wt_*).
//
// The tutorial kernels used to introduce the HLS flow (gcd, axilite_example,
// axis_example, maxi_example) stand beside the chain, unconnected to it,
// each with its own ports under its own prefix.
module bf_top
  import bf_pkg::*;
#(
  parameter int NCHANNEL  = 32,
  parameter int NELEMENT  = 32,
  parameter int NBEAM     = 32,
  parameter int PKT_WORDS = 64,
  parameter int NSLOT     = 4,
  parameter int SHIFT     = 8,
  localparam int CW = $clog2(NCHANNEL),
  localparam int BW = $clog2(NBEAM),
  localparam int AW = $clog2(NSLOT) + CW + $clog2(NELEMENT) + $clog2(PKT_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  // from the network kernel
  input  word_t             net_rx_tdata,
  input  logic [KEEP_W-1:0] net_rx_tkeep,
  input  logic              net_rx_tlast,
  input  logic              net_rx_tvalid,
  output logic              net_rx_tready,
  // to the network kernel
  output word_t             net_tx_tdata,
  output logic [KEEP_W-1:0] net_tx_tkeep,
  output logic              net_tx_tlast,
  output logic              net_tx_tvalid,
  input  logic              net_tx_tready,
  // reorder buffer memory
  output logic              hbm_wr_en,
  output logic [AW-1:0]     hbm_wr_addr,
  output word_t             hbm_wr_data,
  input  logic              hbm_wr_ready,
  output logic              hbm_rd_en,
  output logic [AW-1:0]     hbm_rd_addr,
  input  logic              hbm_rd_ready,
  input  word_t             hbm_rd_data,
  input  logic              hbm_rd_valid,
  // beam weights from the host
  input  logic              wt_we,
  input  logic [CW+BW-1:0]  wt_addr,
  input  word_t             wt_data,
  // status
  output logic [31:0]       rx_pkts,
  output logic [31:0]       rx_bad_pkts,
  output logic [31:0]       ro_pkts_in,
  output logic [31:0]       ro_late_pkts,
  output logic [31:0]       ro_dup_pkts,
  output logic [31:0]       ro_bad_pkts,
  output logic [31:0]       ro_lost_pkts,
  output logic [31:0]       ro_frames,
  output logic [31:0]       ro_forced_frames,
  output logic [31:0]       ro_stall_cycles,
  output logic [31:0]       tx_pkts,
  // tutorial kernel: gcd
  input  logic              gcd_ap_rst,
  input  logic              gcd_ap_start,
  output logic              gcd_ap_done,
  output logic              gcd_ap_idle,
  output logic              gcd_ap_ready,
  input  logic [31:0]       gcd_ain,
  input  logic [31:0]       gcd_bin,
  output logic [31:0]       gcd_ap_return,
  // tutorial kernel: AXI4-Lite
  input  logic [4:0]        lite_awaddr,
  input  logic              lite_awvalid,
  output logic              lite_awready,
  input  logic [31:0]       lite_wdata,
  input  logic [3:0]        lite_wstrb,
  input  logic              lite_wvalid,
  output logic              lite_wready,
  output logic [1:0]        lite_bresp,
  output logic              lite_bvalid,
  input  logic              lite_bready,
  input  logic [4:0]        lite_araddr,
  input  logic              lite_arvalid,
  output logic              lite_arready,
  output logic [31:0]       lite_rdata,
  output logic [1:0]        lite_rresp,
  output logic              lite_rvalid,
  input  logic              lite_rready,
  output logic              lite_irq,
  // tutorial kernel: AXI4-Stream
  input  logic [31:0]       axs_a_tdata,
  input  logic [3:0]        axs_a_tkeep,
  input  logic [3:0]        axs_a_tstrb,
  input  logic              axs_a_tlast,
  input  logic              axs_a_tvalid,
  output logic              axs_a_tready,
  output logic [31:0]       axs_b_tdata,
  output logic [3:0]        axs_b_tkeep,
  output logic [3:0]        axs_b_tstrb,
  output logic              axs_b_tlast,
  output logic              axs_b_tvalid,
  input  logic              axs_b_tready,
  // tutorial kernel: AXI4 master
  input  logic              mx_ap_start,
  output logic              mx_ap_done,
  output logic              mx_ap_idle,
  output logic              mx_ap_ready,
  input  logic [63:0]       mx_a,
  output logic [63:0]       mx_araddr,
  output logic [7:0]        mx_arlen,
  output logic [2:0]        mx_arsize,
  output logic [1:0]        mx_arburst,
  output logic              mx_arvalid,
  input  logic              mx_arready,
  input  logic [31:0]       mx_rdata,
  input  logic [1:0]        mx_rresp,
  input  logic              mx_rlast,
  input  logic              mx_rvalid,
  output logic              mx_rready,
  output logic [63:0]       mx_awaddr,
  output logic [7:0]        mx_awlen,
  output logic [2:0]        mx_awsize,
  output logic [1:0]        mx_awburst,
  output logic              mx_awvalid,
  input  logic              mx_awready,
  output logic [31:0]       mx_wdata,
  output logic [3:0]        mx_wstrb,
  output logic              mx_wlast,
  output logic              mx_wvalid,
  input  logic              mx_wready,
  input  logic [1:0]        mx_bresp,
  input  logic              mx_bvalid,
  output logic              mx_bready,
  output logic              mx_resp_err
);

  // ------------------------------------------------------------ stream links
  word_t rx_tdata,  ro_tdata,  ct_tdata,  bf_tdata,  ct2_tdata;
  side_t rx_tuser,  ro_tuser,  ct_tuser,  bf_tuser,  ct2_tuser;
  logic  rx_tlast,  ro_tlast,  ct_tlast,  bf_tlast,  ct2_tlast;
  logic  rx_tvalid, ro_tvalid, ct_tvalid, bf_tvalid, ct2_tvalid;
  logic  rx_tready, ro_tready, ct_tready, bf_tready, ct2_tready;

  spead_recv u_spead_recv (
    .clk, .rst_n,
    .s_tdata (net_rx_tdata), .s_tkeep (net_rx_tkeep), .s_tlast (net_rx_tlast),
    .s_tvalid(net_rx_tvalid), .s_tready(net_rx_tready),
    .m_tdata (rx_tdata), .m_tuser (rx_tuser), .m_tlast (rx_tlast),
    .m_tvalid(rx_tvalid), .m_tready(rx_tready),
    .pkts    (rx_pkts), .bad_pkts(rx_bad_pkts)
  );

  reorder #(
    .NCHANNEL(NCHANNEL), .NELEMENT(NELEMENT), .PKT_WORDS(PKT_WORDS), .NSLOT(NSLOT)
  ) u_reorder (
    .clk, .rst_n, .flush,
    .s_tdata (rx_tdata), .s_tuser (rx_tuser), .s_tlast (rx_tlast),
    .s_tvalid(rx_tvalid), .s_tready(rx_tready),
    .m_tdata (ro_tdata), .m_tuser (ro_tuser), .m_tlast (ro_tlast),
    .m_tvalid(ro_tvalid), .m_tready(ro_tready),
    .mem_wr_en   (hbm_wr_en),   .mem_wr_addr (hbm_wr_addr), .mem_wr_data(hbm_wr_data),
    .mem_wr_ready(hbm_wr_ready),
    .mem_rd_en   (hbm_rd_en),   .mem_rd_addr (hbm_rd_addr), .mem_rd_ready(hbm_rd_ready),
    .mem_rd_data (hbm_rd_data), .mem_rd_valid(hbm_rd_valid),
    .pkts_in     (ro_pkts_in),  .late_pkts(ro_late_pkts), .dup_pkts(ro_dup_pkts),
    .bad_pkts    (ro_bad_pkts), .lost_pkts(ro_lost_pkts), .frames_out(ro_frames),
    .forced_frames(ro_forced_frames), .stall_cycles(ro_stall_cycles)
  );

  corner_turner #(.NELEMENT(NELEMENT), .PKT_WORDS(PKT_WORDS)) u_corner_turner (
    .clk, .rst_n,
    .s_tdata (ro_tdata), .s_tuser (ro_tuser), .s_tlast (ro_tlast),
    .s_tvalid(ro_tvalid), .s_tready(ro_tready),
    .m_tdata (ct_tdata), .m_tuser (ct_tuser), .m_tlast (ct_tlast),
    .m_tvalid(ct_tvalid), .m_tready(ct_tready)
  );

  beamformer #(
    .NCHANNEL(NCHANNEL), .NELEMENT(NELEMENT), .NBEAM(NBEAM), .SHIFT(SHIFT)
  ) u_beamformer (
    .clk, .rst_n,
    .wt_we, .wt_addr, .wt_data,
    .s_tdata (ct_tdata), .s_tuser (ct_tuser), .s_tlast (ct_tlast),
    .s_tvalid(ct_tvalid), .s_tready(ct_tready),
    .m_tdata (bf_tdata), .m_tuser (bf_tuser), .m_tlast (bf_tlast),
    .m_tvalid(bf_tvalid), .m_tready(bf_tready)
  );

  corner_turner2 #(.NBEAM(NBEAM), .PKT_WORDS(PKT_WORDS)) u_corner_turner2 (
    .clk, .rst_n,
    .s_tdata (bf_tdata), .s_tuser (bf_tuser), .s_tlast (bf_tlast),
    .s_tvalid(bf_tvalid), .s_tready(bf_tready),
    .m_tdata (ct2_tdata), .m_tuser (ct2_tuser), .m_tlast (ct2_tlast),
    .m_tvalid(ct2_tvalid), .m_tready(ct2_tready)
  );

  spead_send #(.PKT_WORDS(PKT_WORDS)) u_spead_send (
    .clk, .rst_n,
    .s_tdata (ct2_tdata), .s_tuser (ct2_tuser), .s_tlast (ct2_tlast),
    .s_tvalid(ct2_tvalid), .s_tready(ct2_tready),
    .m_tdata (net_tx_tdata), .m_tkeep (net_tx_tkeep), .m_tlast (net_tx_tlast),
    .m_tvalid(net_tx_tvalid), .m_tready(net_tx_tready),
    .pkts    (tx_pkts)
  );

  // ------------------------------------------------------- tutorial kernels
  gcd #(.WIDTH(32)) u_gcd (
    .ap_clk(clk), .ap_rst(gcd_ap_rst), .ap_start(gcd_ap_start),
    .ap_done(gcd_ap_done), .ap_idle(gcd_ap_idle), .ap_ready(gcd_ap_ready),
    .Ain(gcd_ain), .Bin(gcd_bin), .ap_return(gcd_ap_return)
  );

  axilite_example u_axilite_example (
    .clk, .rst_n,
    .awaddr(lite_awaddr), .awvalid(lite_awvalid), .awready(lite_awready),
    .wdata(lite_wdata), .wstrb(lite_wstrb), .wvalid(lite_wvalid), .wready(lite_wready),
    .bresp(lite_bresp), .bvalid(lite_bvalid), .bready(lite_bready),
    .araddr(lite_araddr), .arvalid(lite_arvalid), .arready(lite_arready),
    .rdata(lite_rdata), .rresp(lite_rresp), .rvalid(lite_rvalid), .rready(lite_rready),
    .irq(lite_irq)
  );

  axis_example u_axis_example (
    .clk, .rst_n,
    .a_tdata(axs_a_tdata), .a_tkeep(axs_a_tkeep), .a_tstrb(axs_a_tstrb),
    .a_tlast(axs_a_tlast), .a_tvalid(axs_a_tvalid), .a_tready(axs_a_tready),
    .b_tdata(axs_b_tdata), .b_tkeep(axs_b_tkeep), .b_tstrb(axs_b_tstrb),
    .b_tlast(axs_b_tlast), .b_tvalid(axs_b_tvalid), .b_tready(axs_b_tready)
  );

  maxi_example #(.DEPTH(50)) u_maxi_example (
    .clk, .rst_n,
    .ap_start(mx_ap_start), .ap_done(mx_ap_done), .ap_idle(mx_ap_idle),
    .ap_ready(mx_ap_ready), .a(mx_a),
    .araddr(mx_araddr), .arlen(mx_arlen), .arsize(mx_arsize), .arburst(mx_arburst),
    .arvalid(mx_arvalid), .arready(mx_arready),
    .rdata(mx_rdata), .rresp(mx_rresp), .rlast(mx_rlast), .rvalid(mx_rvalid),
    .rready(mx_rready),
    .awaddr(mx_awaddr), .awlen(mx_awlen), .awsize(mx_awsize), .awburst(mx_awburst),
    .awvalid(mx_awvalid), .awready(mx_awready),
    .wdata(mx_wdata), .wstrb(mx_wstrb), .wlast(mx_wlast), .wvalid(mx_wvalid),
    .wready(mx_wready),
    .bresp(mx_bresp), .bvalid(mx_bvalid), .bready(mx_bready),
    .resp_err(mx_resp_err)
  );

endmodule
