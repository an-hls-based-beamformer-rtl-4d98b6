// tb_bf_top_full: one complete time frame through the beamformer card at
// its full size (32 channels, 32 elements, 32 beams, 64-word packets of
// 2048 samples, 4 buffer slots), with every parameter of bf_top at its
// default. All 1024 element packets of the frame enter in random order; the
// 1024 beam packets that leave are compared byte by byte with packets built
// from a reference beamformer computed here. Once the frame is complete the
// chain must stream: the 1024 output packets of 66 words each must leave
// back to back, one word per cycle (the buffer memory model answers reads
// 8 cycles late). The reorder counters must show one frame and no loss. The
// tutorial kernels are held idle.
module tb_bf_top_full;
  import bf_pkg::*;
  import spead_tb_pkg::*;

  localparam int NC = 32, NE = 32, NB = 32, PW = 64, SH = 8;
  localparam int NT  = PW * LANES;
  localparam int TSH = $clog2(NT);
  localparam int CW  = $clog2(NC), BW = $clog2(NB);
  localparam int AW  = 2 + CW + $clog2(NE) + $clog2(PW);
  localparam int T0  = 77;

  logic clk = 0, rst_n, flush;
  word_t net_rx_tdata, net_tx_tdata, hbm_wr_data, hbm_rd_data, wt_data;
  logic [63:0] net_rx_tkeep, net_tx_tkeep;
  logic net_rx_tlast, net_rx_tvalid, net_rx_tready;
  logic net_tx_tlast, net_tx_tvalid, net_tx_tready;
  logic hbm_wr_en, hbm_wr_ready, hbm_rd_en, hbm_rd_ready, hbm_rd_valid;
  logic [AW-1:0] hbm_wr_addr, hbm_rd_addr;
  logic wt_we;
  logic [CW+BW-1:0] wt_addr;
  logic [31:0] rx_pkts, rx_bad_pkts, ro_pkts_in, ro_late_pkts, ro_dup_pkts, ro_bad_pkts,
               ro_lost_pkts, ro_frames, ro_forced_frames, ro_stall_cycles, tx_pkts;
  logic gcd_ap_rst, gcd_ap_start, gcd_ap_done, gcd_ap_idle, gcd_ap_ready;
  logic [31:0] gcd_ain, gcd_bin, gcd_ap_return;
  logic [4:0] lite_awaddr, lite_araddr;
  logic lite_awvalid, lite_awready, lite_wvalid, lite_wready, lite_bvalid, lite_bready;
  logic lite_arvalid, lite_arready, lite_rvalid, lite_rready, lite_irq;
  logic [31:0] lite_wdata, lite_rdata;
  logic [3:0] lite_wstrb;
  logic [1:0] lite_bresp, lite_rresp;
  logic [31:0] axs_a_tdata, axs_b_tdata;
  logic [3:0] axs_a_tkeep, axs_a_tstrb, axs_b_tkeep, axs_b_tstrb;
  logic axs_a_tlast, axs_a_tvalid, axs_a_tready, axs_b_tlast, axs_b_tvalid, axs_b_tready;
  logic mx_ap_start, mx_ap_done, mx_ap_idle, mx_ap_ready, mx_resp_err;
  logic [63:0] mx_a, mx_araddr, mx_awaddr;
  logic [7:0] mx_arlen, mx_awlen;
  logic [2:0] mx_arsize, mx_awsize;
  logic [1:0] mx_arburst, mx_awburst, mx_bresp;
  logic mx_arvalid, mx_arready, mx_rlast, mx_rvalid, mx_rready, mx_bvalid, mx_bready;
  logic mx_awvalid, mx_awready, mx_wlast, mx_wvalid, mx_wready;
  logic [31:0] mx_rdata, mx_wdata;
  logic [1:0] mx_rresp;
  logic [3:0] mx_wstrb;

  int checks = 0, failures = 0;

  bf_top dut (.*);

  hbm_model #(.AW(AW), .LAT(8), .STALL(0)) u_hbm (
    .clk, .rst_n, .wr_en(hbm_wr_en), .wr_addr(hbm_wr_addr), .wr_data(hbm_wr_data),
    .wr_ready(hbm_wr_ready), .rd_en(hbm_rd_en), .rd_addr(hbm_rd_addr),
    .rd_ready(hbm_rd_ready), .rd_data(hbm_rd_data), .rd_valid(hbm_rd_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired: rx=%0d ro_in=%0d frames=%0d lost=%0d dup=%0d late=%0d bad=%0d got=%0d tx=%0d",
             rx_pkts, ro_pkts_in, ro_frames, ro_lost_pkts, ro_dup_pkts, ro_late_pkts, ro_bad_pkts, got, tx_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] x [NC][NE][NT];
  int          wr [NC][NB][NE], wi [NC][NB][NE];
  bytes_t      exp_pk [$];

  function automatic int sat8(int v);
    v = v >>> SH;
    return v > 127 ? 127 : (v < -128 ? -128 : v);
  endfunction

  task automatic send_bytes(bytes_t p);
    int nw = (p.size() + 63) / 64;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk);
      net_rx_tdata = '0; net_rx_tkeep = '0;
      for (int b = 0; b < 64; b++)
        if (64*w + b < p.size()) begin net_rx_tdata[8*b +: 8] = p[64*w + b]; net_rx_tkeep[b] = 1; end
      net_rx_tvalid = 1; net_rx_tlast = (w == nw - 1);
      @(posedge clk);
      while (!net_rx_tready) @(posedge clk);
    end
    @(negedge clk) net_rx_tvalid = 0;
  endtask

  bytes_t cur;
  int got = 0, t_first_out = -1, t_last_out = 0;
  always @(posedge clk) if (rst_n && net_tx_tvalid && net_tx_tready) begin
    if (t_first_out < 0) t_first_out = int'($time);
    t_last_out = int'($time);
    for (int b = 0; b < 64; b++) if (net_tx_tkeep[b]) cur.push_back(net_tx_tdata[8*b +: 8]);
    if (net_tx_tlast) begin
      bytes_t e;
      e = exp_pk.pop_front();
      checks++;
      if (cur != e) begin
        failures++;
        if (failures < 8) $display("FAIL output packet %0d", got);
      end
      got++;
      cur.delete();
    end
  end

  initial begin
    int order [$];
    rst_n = 0; flush = 0;
    net_rx_tvalid = 0; net_rx_tdata = 0; net_rx_tkeep = 0; net_rx_tlast = 0; net_tx_tready = 1;
    wt_we = 0; wt_addr = 0; wt_data = 0;
    gcd_ap_rst = 1; gcd_ap_start = 0; gcd_ain = 0; gcd_bin = 0;
    lite_awaddr = 0; lite_awvalid = 0; lite_wdata = 0; lite_wstrb = 0; lite_wvalid = 0;
    lite_bready = 0; lite_araddr = 0; lite_arvalid = 0; lite_rready = 0;
    axs_a_tdata = 0; axs_a_tkeep = 0; axs_a_tstrb = 0; axs_a_tlast = 0; axs_a_tvalid = 0; axs_b_tready = 1;
    mx_ap_start = 0; mx_a = 0;
    mx_arready = 0; mx_rdata = 0; mx_rresp = 0; mx_rlast = 0; mx_rvalid = 0;
    mx_awready = 0; mx_wready = 0; mx_bresp = 0; mx_bvalid = 0;

    for (int c = 0; c < NC; c++) for (int e = 0; e < NE; e++) for (int s = 0; s < NT; s++)
      x[c][e][s] = {8'($urandom_range(32) - 16), 8'($urandom_range(32) - 16)};
    for (int c = 0; c < NC; c++) for (int b = 0; b < NB; b++) for (int e = 0; e < NE; e++) begin
      wr[c][b][e] = int'($urandom_range(255)) - 128;
      wi[c][b][e] = int'($urandom_range(255)) - 128;
    end
    // reference beams
    for (int c = 0; c < NC; c++)
      for (int b = 0; b < NB; b++) begin
        bytes_t pay;
        pay.delete();
        for (int s = 0; s < NT; s++) begin
          int acc_re, acc_im;
          acc_re = 0; acc_im = 0;
          for (int e = 0; e < NE; e++) begin
            int r, i;
            r = int'($signed(x[c][e][s][7:0]));
            i = int'($signed(x[c][e][s][15:8]));
            acc_re += r * wr[c][b][e] - i * wi[c][b][e];
            acc_im += r * wi[c][b][e] + i * wr[c][b][e];
          end
          pay.push_back(8'(sat8(acc_re)));
          pay.push_back(8'(sat8(acc_im)));
        end
        exp_pk.push_back(build(c * NB + b, longint'(T0) << TSH, c, b, pay));
      end

    repeat (3) @(negedge clk);
    rst_n = 1; gcd_ap_rst = 0;
    for (int c = 0; c < NC; c++)
      for (int b = 0; b < NB; b++) begin
        @(negedge clk);
        for (int e = 0; e < NE; e++) begin
          wt_data[16*e +: 8] = 8'(wr[c][b][e]);
          wt_data[16*e + 8 +: 8] = 8'(wi[c][b][e]);
        end
        wt_we = 1; wt_addr = {CW'(c), BW'(b)};
      end
    @(negedge clk) wt_we = 0;

    for (int k = 0; k < NC * NE; k++) order.push_back(k);
    order.shuffle();
    foreach (order[n]) begin
      int c, e;
      bytes_t pay;
      c = order[n] / NE;
      e = order[n] % NE;
      pay.delete();
      for (int s = 0; s < NT; s++) begin pay.push_back(x[c][e][s][7:0]); pay.push_back(x[c][e][s][15:8]); end
      send_bytes(build(n, longint'(T0) << TSH, c, e, pay));
    end
    for (int i = 0; i < 300000 && exp_pk.size() != 0; i++) @(negedge clk);
    checks++;
    if (exp_pk.size() != 0) begin failures++; $display("FAIL %0d output packets missing", exp_pk.size()); end
    // the chain streams: 1024 beam packets of 66 words leave back to back
    checks++;
    $display("output took %0d cycles for %0d packets", (t_last_out - t_first_out) / 10 + 1, got);
    if ((t_last_out - t_first_out) / 10 + 1 > NC * NB * (PW + 2) + 64) begin
      failures++; $display("FAIL output not at one word per cycle");
    end
    checks++;
    if (ro_frames != 1 || ro_lost_pkts != 0 || tx_pkts != NC * NB) begin
      failures++; $display("FAIL counters frames=%0d lost=%0d tx=%0d", ro_frames, ro_lost_pkts, tx_pkts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
