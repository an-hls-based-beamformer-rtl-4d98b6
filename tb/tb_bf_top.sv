// tb_bf_top: end-to-end test of the beamformer card at reduced size
// (2 channels, 2-word packets; 32 elements and 32 beams as in the full
// design). SPEAD packets of seven time frames enter from the network side;
// the beamformed SPEAD packets leaving it are reassembled byte by byte and
// compared with packets built here from a reference beamformer
// (integer complex sums of weight x sample, shifted and saturated).
//
// The sequence makes every mechanism of the chain happen and counts it:
// packets arriving out of order, lost packets replaced by zeros, a frame
// forced out by a packet four frames ahead while the input stalls, a late
// packet dropped, a packet with a broken SPEAD header dropped, flush
// releasing the last incomplete frame, buffer-memory stalls and
// back-pressure from the network. The four tutorial kernels run alongside
// with one example each.
module tb_bf_top;
  import bf_pkg::*;
  import spead_tb_pkg::*;

  localparam int NC = 2, NE = 32, NB = 32, PW = 2, NS = 4, SH = 8;
  localparam int NT  = PW * LANES;
  localparam int TSH = $clog2(NT);
  localparam int CW  = $clog2(NC), BW = $clog2(NB);
  localparam int AW  = $clog2(NS) + CW + $clog2(NE) + $clog2(PW);
  localparam int T0  = 10;           // first frame
  localparam int NF  = 7;            // frames 10..16

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
  // tutorial kernels
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
  logic [1:0] mx_arburst, mx_awburst, mx_rresp, mx_bresp;
  logic mx_arvalid, mx_arready, mx_rlast, mx_rvalid, mx_rready;
  logic mx_awvalid, mx_awready, mx_wlast, mx_wvalid, mx_wready, mx_bvalid, mx_bready;
  logic [31:0] mx_rdata, mx_wdata;
  logic [3:0] mx_wstrb;
  int mx_wlast_errors;

  int checks = 0, failures = 0;

  bf_top #(.NCHANNEL(NC), .NELEMENT(NE), .NBEAM(NB), .PKT_WORDS(PW), .NSLOT(NS),
           .SHIFT(SH)) dut (.*);

  hbm_model #(.AW(AW), .LAT(5), .STALL(1)) u_hbm (
    .clk, .rst_n, .wr_en(hbm_wr_en), .wr_addr(hbm_wr_addr), .wr_data(hbm_wr_data),
    .wr_ready(hbm_wr_ready), .rd_en(hbm_rd_en), .rd_addr(hbm_rd_addr),
    .rd_ready(hbm_rd_ready), .rd_data(hbm_rd_data), .rd_valid(hbm_rd_valid));

  axi4_mem_model #(.MEMW(256)) u_axi_mem (
    .clk, .rst_n, .araddr(mx_araddr), .arlen(mx_arlen), .arvalid(mx_arvalid),
    .arready(mx_arready), .rdata(mx_rdata), .rresp(mx_rresp), .rlast(mx_rlast),
    .rvalid(mx_rvalid), .rready(mx_rready), .awaddr(mx_awaddr), .awlen(mx_awlen),
    .awvalid(mx_awvalid), .awready(mx_awready), .wdata(mx_wdata), .wlast(mx_wlast),
    .wvalid(mx_wvalid), .wready(mx_wready), .bresp(mx_bresp), .bvalid(mx_bvalid),
    .bready(mx_bready), .wlast_errors(mx_wlast_errors));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ scenario
  logic [15:0] x [NF][NC][NE][NT];   // samples, re in the low byte
  bit          present [NF][NC][NE];
  int          wr [NC][NB][NE], wi [NC][NB][NE];
  bytes_t      exp_pk [$];
  int          n_out_of_order = 0, n_net_bp = 0, n_hbm_stall = 0;

  function automatic int sat8(int v);
    v = v >>> SH;
    return v > 127 ? 127 : (v < -128 ? -128 : v);
  endfunction

  function automatic int sre(logic [15:0] s); return int'($signed(s[7:0])); endfunction
  function automatic int sim(logic [15:0] s); return int'($signed(s[15:8])); endfunction

  task automatic expect_frames();
    int heap = 0;
    for (int f = 0; f < NF; f++)
      for (int c = 0; c < NC; c++)
        for (int b = 0; b < NB; b++) begin
          bytes_t pay;
          for (int s = 0; s < NT; s++) begin
            int acc_re = 0, acc_im = 0;
            for (int e = 0; e < NE; e++)
              if (present[f][c][e]) begin
                acc_re += sre(x[f][c][e][s]) * wr[c][b][e] - sim(x[f][c][e][s]) * wi[c][b][e];
                acc_im += sre(x[f][c][e][s]) * wi[c][b][e] + sim(x[f][c][e][s]) * wr[c][b][e];
              end
            pay.push_back(8'(sat8(acc_re)));
            pay.push_back(8'(sat8(acc_im)));
          end
          exp_pk.push_back(build(heap, longint'(T0 + f) << TSH, c, b, pay));
          heap++;
        end
  endtask

  task automatic send_bytes(bytes_t p);
    int nw = (p.size() + 63) / 64;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk);
      while ($urandom_range(5) == 0) begin net_rx_tvalid = 0; @(negedge clk); end
      net_rx_tdata = '0; net_rx_tkeep = '0;
      for (int b = 0; b < 64; b++)
        if (64*w + b < p.size()) begin net_rx_tdata[8*b +: 8] = p[64*w + b]; net_rx_tkeep[b] = 1; end
      net_rx_tvalid = 1; net_rx_tlast = (w == nw - 1);
      @(posedge clk);
      while (!net_rx_tready) @(posedge clk);
    end
    @(negedge clk) net_rx_tvalid = 0;
  endtask

  int last_sent = -1;
  task automatic send_pkt(int f, int c, int e);
    bytes_t pay;
    for (int s = 0; s < NT; s++) begin pay.push_back(x[f][c][e][s][7:0]); pay.push_back(x[f][c][e][s][15:8]); end
    if (f * NC * NE + c * NE + e < last_sent) n_out_of_order++;
    last_sent = f * NC * NE + c * NE + e;
    send_bytes(build($urandom, longint'(T0 + f) << TSH, c, e, pay));
  endtask

  task automatic send_frame_shuffled(int f);
    int order [$];
    for (int k = 0; k < NC * NE; k++) if (present[f][k / NE][k % NE]) order.push_back(k);
    order.shuffle();
    foreach (order[i]) begin
      int k;
      k = order[i];
      send_pkt(f, k / NE, k % NE);
    end
  endtask

  // ------------------------------------------------------------ checking
  bytes_t cur;
  int got = 0;
  always @(posedge clk) if (rst_n) begin
    if (net_tx_tvalid && !net_tx_tready) n_net_bp++;
    if ((hbm_wr_en && !hbm_wr_ready) || (hbm_rd_en && !hbm_rd_ready)) n_hbm_stall++;
    if (net_tx_tvalid && net_tx_tready) begin
      for (int b = 0; b < 64; b++) if (net_tx_tkeep[b]) cur.push_back(net_tx_tdata[8*b +: 8]);
      if (net_tx_tlast) begin
        bytes_t e;
        e = exp_pk.pop_front();
        checks++;
        if (cur != e) begin
          failures++;
          if (failures < 8) begin
            $display("FAIL output packet %0d (%0d bytes, want %0d)", got, cur.size(), e.size());
            for (int i = 0; i < e.size() && i < cur.size(); i++)
              if (cur[i] != e[i]) begin $display("  first difference at byte %0d: %h want %h", i, cur[i], e[i]); break; end
          end
        end
        got++;
        cur.delete();
      end
    end
  end

  task automatic mech(string name, int n);
    checks++;
    $display("mechanism %-28s happened %0d times", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", name); end
  endtask

  // ------------------------------------------------------------ tutorial kernels
  task automatic lite_wr(logic [4:0] a, logic [31:0] d);
    @(negedge clk);
    lite_awaddr = a; lite_awvalid = 1; lite_wdata = d; lite_wstrb = 4'hf; lite_wvalid = 1;
    fork
      begin @(posedge clk); while (!lite_awready) @(posedge clk); @(negedge clk) lite_awvalid = 0; end
      begin @(posedge clk); while (!lite_wready)  @(posedge clk); @(negedge clk) lite_wvalid = 0; end
    join
    lite_bready = 1;
    @(posedge clk); while (!lite_bvalid) @(posedge clk);
    @(negedge clk) lite_bready = 0;
  endtask

  task automatic lite_rd(logic [4:0] a, output logic [31:0] d);
    @(negedge clk);
    lite_araddr = a; lite_arvalid = 1;
    @(posedge clk); while (!lite_arready) @(posedge clk);
    @(negedge clk) lite_arvalid = 0;
    lite_rready = 1;
    while (!lite_rvalid) @(negedge clk);
    d = lite_rdata;
    @(posedge clk);
    @(negedge clk) lite_rready = 0;
  endtask

  task automatic tutorial_kernels();
    logic [31:0] d, prev [50];
    // gcd(105, 77) = 7
    @(negedge clk) gcd_ain = 105; gcd_bin = 77; gcd_ap_start = 1;
    while (!gcd_ap_done) @(negedge clk);
    gcd_ap_start = 0;
    checks++; if (gcd_ap_return != 7) begin failures++; $display("FAIL gcd = %0d", gcd_ap_return); end
    // AXI4-Stream: +5
    axs_b_tready = 1;
    @(negedge clk) axs_a_tdata = 32'd37; axs_a_tkeep = 4'hf; axs_a_tstrb = 4'hf; axs_a_tlast = 1; axs_a_tvalid = 1;
    @(negedge clk) axs_a_tvalid = 0;
    checks++; if (!axs_b_tvalid || axs_b_tdata != 32'd42) begin failures++; $display("FAIL axis example"); end
    // AXI4-Lite: b = 3 + 2*4
    lite_wr(5'h10, 3);
    lite_wr(5'h14, 4);
    lite_wr(5'h00, 1);
    do lite_rd(5'h00, d); while (!d[1]);
    lite_rd(5'h14, d);
    checks++; if (d != 11) begin failures++; $display("FAIL axilite example b = %0d", d); end
    // AXI4 master: 50 words at byte address 64 incremented
    for (int i = 0; i < 50; i++) prev[i] = u_axi_mem.mem[16 + i];
    @(negedge clk) mx_a = 64; mx_ap_start = 1;
    while (!mx_ap_done) @(negedge clk);
    mx_ap_start = 0;
    for (int i = 0; i < 50; i++) begin
      checks++;
      if (u_axi_mem.mem[16 + i] != prev[i] + 1) begin failures++; $display("FAIL maxi word %0d", i); end
    end
  endtask

  // ------------------------------------------------------------ main
  initial begin
    rst_n = 0; flush = 0;
    net_rx_tvalid = 0; net_rx_tdata = 0; net_rx_tkeep = 0; net_rx_tlast = 0; net_tx_tready = 1;
    wt_we = 0; wt_addr = 0; wt_data = 0;
    gcd_ap_rst = 1; gcd_ap_start = 0; gcd_ain = 0; gcd_bin = 0;
    lite_awaddr = 0; lite_awvalid = 0; lite_wdata = 0; lite_wstrb = 0; lite_wvalid = 0;
    lite_bready = 0; lite_araddr = 0; lite_arvalid = 0; lite_rready = 0;
    axs_a_tdata = 0; axs_a_tkeep = 0; axs_a_tstrb = 0; axs_a_tlast = 0; axs_a_tvalid = 0; axs_b_tready = 1;
    mx_ap_start = 0; mx_a = 0;
    for (int i = 0; i < 256; i++) u_axi_mem.mem[i] = $urandom;

    // scenario: frame 11 loses two packets, frame 16 holds one packet only
    for (int f = 0; f < NF; f++)
      for (int c = 0; c < NC; c++)
        for (int e = 0; e < NE; e++) begin
          present[f][c][e] = 1;
          for (int s = 0; s < NT; s++)
            x[f][c][e][s] = {8'($urandom_range(32) - 16), 8'($urandom_range(32) - 16)};
        end
    present[1][0][3] = 0;
    present[1][1][30] = 0;
    for (int c = 0; c < NC; c++) for (int e = 0; e < NE; e++) present[6][c][e] = (c == 1 && e == 7);
    for (int c = 0; c < NC; c++) for (int b = 0; b < NB; b++) for (int e = 0; e < NE; e++) begin
      wr[c][b][e] = int'($urandom_range(255)) - 128;
      wi[c][b][e] = int'($urandom_range(255)) - 128;
    end
    expect_frames();

    repeat (3) @(negedge clk);
    rst_n = 1; gcd_ap_rst = 0;
    fork
      forever @(negedge clk) net_tx_tready = ($urandom_range(4) != 0);
    join_none

    // beam weights from the host
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

    fork
      tutorial_kernels();
      begin
        send_frame_shuffled(0);                          // frame 10
        for (int f = 1; f <= 4; f++) send_frame_shuffled(f);   // 11 (2 lost) .. 14
        send_pkt(5, 0, 0);                               // frame 15 forces 11 out
        send_pkt(0, 0, 5);                               // late: frame 10
        begin                                            // broken SPEAD header
          bytes_t p;
          p = build(1, longint'(T0 + 5) << TSH, 0, 1, '{default: 8'h00});
          p[1] = 8'h05;
          send_bytes(p);
        end
        for (int e = 1; e < NE; e++) send_pkt(5, 0, e);
        for (int e = 0; e < NE; e++) send_pkt(5, 1, e);
        send_pkt(6, 1, 7);                               // frame 16: one packet
        for (int i = 0; i < 20000 && ro_frames != NF - 1; i++) @(negedge clk);
        flush = 1;
        while (ro_frames != NF) @(negedge clk);
        flush = 0;
      end
    join
    for (int i = 0; i < 50000 && exp_pk.size() != 0; i++) @(negedge clk);
    repeat (10) @(negedge clk);
    checks++;
    if (exp_pk.size() != 0) begin failures++; $display("FAIL %0d output packets missing", exp_pk.size()); end
    checks++;
    if (tx_pkts != NF * NC * NB) begin failures++; $display("FAIL tx_pkts=%0d", tx_pkts); end
    mech("out-of-order arrival", n_out_of_order);
    mech("packet loss, zero filled", ro_lost_pkts);
    mech("overflow stall", ro_stall_cycles);
    mech("forced frame release", ro_forced_frames);
    mech("late packet dropped", ro_late_pkts);
    mech("broken header dropped", rx_bad_pkts);
    mech("flush", int'(ro_forced_frames > 1));
    mech("buffer memory stall", n_hbm_stall);
    mech("network back-pressure", n_net_bp);
    checks++;
    if (ro_lost_pkts != 2 + NC * NE - 1 || ro_late_pkts != 1 || rx_bad_pkts != 1 || ro_forced_frames != 2) begin
      failures++;
      $display("FAIL counters lost=%0d late=%0d bad=%0d forced=%0d", ro_lost_pkts, ro_late_pkts,
               rx_bad_pkts, ro_forced_frames);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
