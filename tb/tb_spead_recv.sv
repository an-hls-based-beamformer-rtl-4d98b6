// tb_spead_recv: sends SPEAD packets built byte by byte into the receiver,
// with random input gaps and output back-pressure, and checks that every
// payload word equals bytes 96+64k.. of its packet, with the side channel
// {timestamp, channel, element} taken from the header and tlast on the last
// word. Packets with a wrong fixed header and packets cut off inside the
// header must be dropped and counted. A final burst without gaps checks the
// interval of one word per cycle and the latency (a payload word leaves one
// cycle after the input word that completes it).
module tb_spead_recv;
  import bf_pkg::*;
  import spead_tb_pkg::*;

  localparam int PW = 64;   // payload words per packet

  logic clk = 0, rst_n;
  word_t s_tdata, m_tdata;
  logic [63:0] s_tkeep;
  logic s_tlast, s_tvalid, s_tready, m_tlast, m_tvalid, m_tready;
  side_t m_tuser;
  logic [31:0] pkts, bad_pkts;
  int checks = 0, failures = 0;

  spead_recv dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { word_t d; side_t u; bit last; } exp_t;
  exp_t exp_q [$];
  bit   gaps;
  int   last_in_cycle [$];   // input cycle of words completing an output word

  task automatic send(bytes_t p, bit good);
    int nw = (p.size() + 63) / 64;
    for (int w = 0; w < nw; w++) begin
      word_t d = '0;
      logic [63:0] k = '0;
      for (int b = 0; b < 64; b++)
        if (64*w + b < p.size()) begin d[8*b +: 8] = p[64*w + b]; k[b] = 1; end
      @(negedge clk);
      while (gaps && $urandom_range(4) == 0) begin s_tvalid = 0; @(negedge clk); end
      s_tvalid = 1; s_tdata = d; s_tkeep = k; s_tlast = (w == nw - 1);
      @(posedge clk);
      while (!s_tready) @(posedge clk);
      if (good && w >= 2) last_in_cycle.push_back(int'($time));
    end
    @(negedge clk) s_tvalid = 0;
  endtask

  task automatic make(longint unsigned ts, int ch, int el, bit good = 1, bit corrupt = 0);
    bytes_t pay, p;
    for (int i = 0; i < 64*PW; i++) pay.push_back($urandom);
    p = build(ts, ts, ch, el, pay);
    if (corrupt) p[3] = 8'h07;
    if (good)
      for (int w = 0; w < PW; w++) begin
        exp_t e;
        for (int b = 0; b < 64; b++) e.d[8*b +: 8] = pay[64*w + b];
        e.u = '{timestamp: ts, channel_id: ch, element_id: el};
        e.last = (w == PW - 1);
        exp_q.push_back(e);
      end
    send(p, good);
  endtask

  int got = 0, lat_bad = 0, run_max = 0, run = 0;
  always @(posedge clk) if (rst_n) begin
    if (m_tvalid && m_tready) begin
      exp_t e;
      e = exp_q.pop_front();
      checks++;
      if (m_tdata != e.d || m_tuser != e.u || m_tlast != e.last) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d: user %h want %h last %b", got, m_tuser, e.u, m_tlast);
      end
      if (!gaps) begin
        if (int'($time) != last_in_cycle.pop_front() + 10) lat_bad++;
      end else void'(last_in_cycle.pop_front());
      got++;
      run++;
      if (run > run_max) run_max = run;
    end else run = 0;
  end

  initial begin
    rst_n = 0; s_tvalid = 0; s_tdata = 0; s_tkeep = 0; s_tlast = 0; m_tready = 1; gaps = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      forever @(negedge clk) m_tready = gaps ? ($urandom_range(3) != 0) : 1'b1;
    join_none
    make(64'h0000_1234_5678_9abc, 3, 17);
    make(64'h0000_0000_0000_0800, 0, 0);
    make(5, 1, 1, 0, 1);                 // wrong header: dropped
    begin                                // cut off inside the header
      bytes_t p;
      for (int i = 0; i < 80; i++) p.push_back(i);
      p[0] = 8'h53;
      send(p, 0);
    end
    for (int i = 0; i < 6; i++) make($urandom, $urandom_range(31), $urandom_range(31));
    wait (exp_q.size() == 0);
    repeat (5) @(negedge clk);
    // free-running burst
    gaps = 1'b0;
    run_max = 0;
    make(64'h42, 7, 9);
    make(64'h43, 8, 10);
    wait (exp_q.size() == 0);
    repeat (5) @(negedge clk);
    checks++;
    if (run_max < PW) begin failures++; $display("FAIL longest run %0d < %0d", run_max, PW); end
    checks++;
    if (lat_bad != 0) begin failures++; $display("FAIL %0d words with wrong latency", lat_bad); end
    checks++;
    if (pkts != 10 || bad_pkts != 2) begin
      failures++; $display("FAIL counters pkts=%0d bad=%0d", pkts, bad_pkts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
