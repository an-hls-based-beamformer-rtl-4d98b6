// tb_reorder: small configuration (2 channels, 4 elements, 4-word packets,
// 4 time slots) against the behavioural buffer memory with random stalls
// and read latency, and random back-pressure at the output. The packet
// sequence makes each mechanism happen: packets of three frames arriving
// shuffled; a frame with two packets lost that is forced out when a packet
// four slots ahead arrives (the input stalls meanwhile); a late packet, a
// duplicate with different data, and a packet with an out-of-range
// channel, all dropped; and a last incomplete frame released by flush. The
// output must be frames 100..107 in order, each in (channel, element)
// order, lost packets as zeros, and the counters must match.
module tb_reorder;
  import bf_pkg::*;

  localparam int NC = 2, NE = 4, PW = 4, NS = 4;
  localparam int TSH = $clog2(PW * LANES);
  localparam int AW = $clog2(NS) + $clog2(NC) + $clog2(NE) + $clog2(PW);

  logic clk = 0, rst_n, flush;
  word_t s_tdata, m_tdata;
  side_t s_tuser, m_tuser;
  logic s_tlast, s_tvalid, s_tready, m_tlast, m_tvalid, m_tready;
  logic mem_wr_en, mem_wr_ready, mem_rd_en, mem_rd_ready, mem_rd_valid;
  logic [AW-1:0] mem_wr_addr, mem_rd_addr;
  word_t mem_wr_data, mem_rd_data;
  logic [31:0] pkts_in, late_pkts, dup_pkts, bad_pkts, lost_pkts, frames_out,
               forced_frames, stall_cycles;
  int checks = 0, failures = 0;

  reorder #(.NCHANNEL(NC), .NELEMENT(NE), .PKT_WORDS(PW), .NSLOT(NS)) dut (.*);

  hbm_model #(.AW(AW), .LAT(3), .STALL(1)) u_mem (
    .clk, .rst_n, .wr_en(mem_wr_en), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data),
    .wr_ready(mem_wr_ready), .rd_en(mem_rd_en), .rd_addr(mem_rd_addr),
    .rd_ready(mem_rd_ready), .rd_data(mem_rd_data), .rd_valid(mem_rd_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t pat(int t, int c, int e, int w, int salt = 0);
    word_t d;
    for (int i = 0; i < 16; i++) d[32*i +: 32] = 32'(t*1000003 + c*7919 + e*104729 + w*31 + i + salt);
    return d;
  endfunction

  bit present [int][NC][NE];     // packets the output must carry

  task automatic pkt(int t, int c, int e, int salt = 0);
    for (int w = 0; w < PW; w++) begin
      @(negedge clk);
      while ($urandom_range(4) == 0) begin s_tvalid = 0; @(negedge clk); end
      s_tvalid = 1;
      s_tdata  = pat(t, c, e, w, salt);
      s_tuser  = '{timestamp: 64'(t) << TSH, channel_id: c, element_id: e};
      s_tlast  = (w == PW - 1);
      @(posedge clk);
      while (!s_tready) @(posedge clk);
    end
    @(negedge clk) s_tvalid = 0;
  endtask

  // output checker
  int o_t = 100, o_c = 0, o_e = 0, o_w = 0, got = 0;
  always @(posedge clk) if (rst_n && m_tvalid && m_tready) begin
    word_t want;
    want = (present.exists(o_t) && present[o_t][o_c][o_e]) ? pat(o_t, o_c, o_e, o_w) : '0;
    checks++;
    if (m_tdata != want || m_tlast != (o_w == PW - 1) ||
        m_tuser != '{timestamp: 64'(o_t) << TSH, channel_id: o_c, element_id: o_e}) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0d c=%0d e=%0d w=%0d: user %h", o_t, o_c, o_e, o_w, m_tuser);
    end
    got++;
    if (++o_w == PW) begin
      o_w = 0;
      if (++o_e == NE) begin
        o_e = 0;
        if (++o_c == NC) begin o_c = 0; o_t++; end
      end
    end
  end

  initial begin
    int order [$];
    rst_n = 0; flush = 0; s_tvalid = 0; s_tdata = 0; s_tuser = 0; s_tlast = 0; m_tready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      forever @(negedge clk) m_tready = ($urandom_range(3) != 0);
    join_none

    // A: frames 100..102, shuffled (the first packet belongs to frame 100)
    for (int t = 100; t <= 102; t++)
      for (int c = 0; c < NC; c++) for (int e = 0; e < NE; e++) present[t][c][e] = 1;
    for (int i = 1; i < 3 * NC * NE; i++) order.push_back(i);
    order.shuffle();
    order.push_front(0);
    foreach (order[i]) begin
      int k;
      k = order[i];
      pkt(100 + k / (NC * NE), (k / NE) % NC, k % NE);
    end

    // B: frame 103 with two packets lost, frames 104..106 complete
    for (int t = 103; t <= 106; t++)
      for (int c = 0; c < NC; c++) for (int e = 0; e < NE; e++) begin
        present[t][c][e] = !(t == 103 && ((c == 0 && e == 1) || (c == 1 && e == 3)));
        if (present[t][c][e]) pkt(t, c, e);
      end
    // a packet four slots ahead of frame 103 forces it out
    present[107][0][0] = 1;
    pkt(107, 0, 0);

    // C: late, duplicate and out-of-range packets
    pkt(102, 1, 1);
    pkt(107, 0, 0, 55);
    pkt(107, 5, 0);
    // rest of frame 107 without (1, 2)
    for (int c = 0; c < NC; c++) for (int e = 0; e < NE; e++)
      if (!(c == 0 && e == 0) && !(c == 1 && e == 2)) begin
        present[107][c][e] = 1;
        pkt(107, c, e);
      end
    present[107][1][2] = 0;
    for (int i = 0; i < 2000 && frames_out != 7; i++) @(negedge clk);
    // frame 107 is incomplete: without flush it must stay
    repeat (200) @(negedge clk);
    checks++;
    if (frames_out != 7) begin failures++; $display("FAIL %0d frames before flush (forced %0d, lost %0d)", frames_out, forced_frames, lost_pkts); end
    flush = 1;
    while (frames_out != 8) @(negedge clk);
    flush = 0;
    while (got != 8 * NC * NE * PW) @(negedge clk);
    repeat (20) @(negedge clk);
    checks++;
    if (got != 8 * NC * NE * PW) begin failures++; $display("FAIL %0d words out", got); end
    checks++;
    if (lost_pkts != 3 || late_pkts != 1 || dup_pkts != 1 || bad_pkts != 1 ||
        forced_frames != 2 || frames_out != 8 || stall_cycles == 0 ||
        pkts_in != 3*8 + 6 + 3*8 + 1 + 6) begin
      failures++;
      $display("FAIL counters lost=%0d late=%0d dup=%0d bad=%0d forced=%0d frames=%0d stall=%0d in=%0d",
               lost_pkts, late_pkts, dup_pkts, bad_pkts, forced_frames, frames_out, stall_cycles, pkts_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
