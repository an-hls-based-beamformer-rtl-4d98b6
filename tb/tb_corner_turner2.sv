// tb_corner_turner2: writes blocks of PKT_WORDS*32 beamformed words (one
// time sample of all 32 beams each) and checks that the output is 32
// packets, one per beam in beam order, whose word w lane l holds sample
// 32w+l of that beam, with the block's timestamp, channel, beam id and
// tlast per packet. Random gaps and back-pressure, then a free-running
// phase where the kernel must sustain one word per cycle.
module tb_corner_turner2;
  import bf_pkg::*;

  localparam int NB = 32;
  localparam int PW = 2;
  localparam int NT = PW * LANES;

  logic clk = 0, rst_n;
  word_t s_tdata, m_tdata;
  side_t s_tuser, m_tuser;
  logic s_tlast, s_tvalid, s_tready, m_tlast, m_tvalid, m_tready;
  int checks = 0, failures = 0;

  corner_turner2 #(.NBEAM(NB), .PKT_WORDS(PW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { word_t d; side_t u; bit last; } exp_t;
  exp_t exp_q [$];
  bit gaps = 1;

  task automatic block(longint unsigned ts, int ch);
    logic [15:0] smp [NB][NT];
    for (int b = 0; b < NB; b++) for (int t = 0; t < NT; t++) smp[b][t] = 16'($urandom);
    for (int b = 0; b < NB; b++)
      for (int w = 0; w < PW; w++) begin
        exp_t x;
        for (int l = 0; l < LANES; l++) x.d[16*l +: 16] = smp[b][LANES*w + l];
        x.u = '{timestamp: ts, channel_id: ch, element_id: b};
        x.last = (w == PW - 1);
        exp_q.push_back(x);
      end
    for (int t = 0; t < NT; t++) begin
      @(negedge clk);
      while (gaps && $urandom_range(4) == 0) begin s_tvalid = 0; @(negedge clk); end
      s_tvalid = 1;
      for (int b = 0; b < NB; b++) s_tdata[16*b +: 16] = smp[b][t];
      s_tuser = '{timestamp: ts + t, channel_id: ch, element_id: 0};
      s_tlast = (t == NT - 1);
      @(posedge clk);
      while (!s_tready) @(posedge clk);
    end
    @(negedge clk) s_tvalid = 0;
  endtask

  int got = 0, t_first = -1, t_last = 0, n_free = 0;
  always @(posedge clk) if (rst_n) begin
    if (m_tvalid && m_tready) begin
      exp_t x;
      x = exp_q.pop_front();
      checks++;
      if (m_tdata != x.d || m_tuser != x.u || m_tlast != x.last) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d: %h / %h want %h / %h", got, m_tdata[31:0], m_tuser, x.d[31:0], x.u);
      end
      got++;
      if (!gaps) begin
        if (t_first < 0) t_first = int'($time);
        t_last = int'($time);
        n_free++;
      end
    end
  end

  initial begin
    rst_n = 0; s_tvalid = 0; s_tdata = 0; s_tuser = 0; s_tlast = 0; m_tready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      forever @(negedge clk) m_tready = gaps ? ($urandom_range(3) != 0) : 1'b1;
    join_none
    for (int i = 0; i < 4; i++) block(64'h2000 * i, i);
    wait (exp_q.size() == 0);
    repeat (5) @(negedge clk);
    gaps = 0;
    for (int i = 0; i < 4; i++) block(64'h7000 + 64'h40 * i, 3);
    wait (exp_q.size() == 0);
    repeat (5) @(negedge clk);
    // four blocks must leave within 4*NT cycles plus a few cycles of
    // pipeline and block turn-around each: one word per cycle sustained
    checks++;
    if (n_free != 4 * NT || (t_last - t_first) / 10 + 1 > 4 * NT + 4 * 4) begin
      failures++;
      $display("FAIL %0d words in %0d cycles", n_free, (t_last - t_first) / 10 + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
