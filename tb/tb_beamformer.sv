// tb_beamformer: loads random complex weights for every (channel, beam),
// streams random element samples of random channels, and compares every
// beam of every output word with y_b = sum_e w[f][b][e] * x_e computed here
// in integers, shifted right by SHIFT and saturated to 8 bits. Samples of
// small and of full range make both the plain and the saturating case
// happen. With a free output, a word must leave exactly 4 cycles after it
// entered and one word per cycle must flow; then random gaps and
// back-pressure.
module tb_beamformer;
  import bf_pkg::*;

  localparam int NC = 4, NE = 32, NB = 32, SH = 8;

  logic clk = 0, rst_n;
  logic wt_we;
  logic [$clog2(NC)+$clog2(NB)-1:0] wt_addr;
  word_t wt_data, s_tdata, m_tdata;
  side_t s_tuser, m_tuser;
  logic s_tlast, s_tvalid, s_tready, m_tlast, m_tvalid, m_tready;
  int checks = 0, failures = 0;

  beamformer #(.NCHANNEL(NC), .NELEMENT(NE), .NBEAM(NB), .SHIFT(SH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int wr [NC][NB][NE], wi [NC][NB][NE];
  typedef struct { word_t d; side_t u; bit last; int t_in; } exp_t;
  exp_t exp_q [$];
  bit gaps = 0;
  int n_sat = 0, n_plain = 0;

  function automatic int sat8(int v);
    v = v >>> SH;
    if (v > 127) return 127;
    if (v < -128) return -128;
    return v;
  endfunction

  task automatic send(int ch, bit big, bit last);
    int xr [NE], xi [NE];
    exp_t x;
    for (int e = 0; e < NE; e++) begin
      xr[e] = big ? int'($urandom_range(255)) - 128 : int'($urandom_range(15)) - 8;
      xi[e] = big ? int'($urandom_range(255)) - 128 : int'($urandom_range(15)) - 8;
      s_tdata[16*e +: 8] = 8'(xr[e]);
      s_tdata[16*e + 8 +: 8] = 8'(xi[e]);
    end
    for (int b = 0; b < NB; b++) begin
      int sr = 0, si = 0, yr, yi;
      for (int e = 0; e < NE; e++) begin
        sr += xr[e] * wr[ch][b][e] - xi[e] * wi[ch][b][e];
        si += xr[e] * wi[ch][b][e] + xi[e] * wr[ch][b][e];
      end
      yr = sat8(sr); yi = sat8(si);
      if (yr != (sr >>> SH) || yi != (si >>> SH)) n_sat++; else n_plain++;
      x.d[16*b +: 8] = 8'(yr);
      x.d[16*b + 8 +: 8] = 8'(yi);
    end
    s_tuser = '{timestamp: $urandom, channel_id: ch, element_id: 0};
    s_tlast = last;
    x.u = s_tuser;
    x.last = last;
    s_tvalid = 1;
    @(posedge clk);
    while (!s_tready) @(posedge clk);
    x.t_in = int'($time);
    exp_q.push_back(x);
    @(negedge clk);
  endtask

  int lat_bad = 0, t_first = -1, t_last = 0, n_free = 0;
  always @(posedge clk) if (rst_n && m_tvalid && m_tready) begin
    exp_t x;
    x = exp_q.pop_front();
    checks++;
    if (m_tdata != x.d || m_tuser != x.u || m_tlast != x.last) begin
      failures++;
      if (failures < 10) $display("FAIL beam word: got %h want %h", m_tdata[63:0], x.d[63:0]);
    end
    if (!gaps) begin
      if (int'($time) != x.t_in + 40) lat_bad++;
      if (t_first < 0) t_first = int'($time);
      t_last = int'($time);
      n_free++;
    end
  end

  initial begin
    rst_n = 0; s_tvalid = 0; s_tdata = 0; s_tuser = 0; s_tlast = 0; m_tready = 1;
    wt_we = 0; wt_addr = 0; wt_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // weights
    for (int c = 0; c < NC; c++)
      for (int b = 0; b < NB; b++) begin
        for (int e = 0; e < NE; e++) begin
          wr[c][b][e] = int'($urandom_range(255)) - 128;
          wi[c][b][e] = int'($urandom_range(255)) - 128;
          wt_data[16*e +: 8] = 8'(wr[c][b][e]);
          wt_data[16*e + 8 +: 8] = 8'(wi[c][b][e]);
        end
        wt_we = 1; wt_addr = {2'(c), 5'(b)};
        @(negedge clk);
      end
    wt_we = 0;
    // free flow: latency and interval
    for (int i = 0; i < 200; i++) send($urandom_range(NC - 1), i[0], i % 10 == 9);
    s_tvalid = 0;
    wait (exp_q.size() == 0);
    repeat (3) @(negedge clk);
    checks++;
    if (lat_bad != 0) begin failures++; $display("FAIL %0d words not 4 cycles late", lat_bad); end
    checks++;
    if (n_free != 200 || (t_last - t_first) / 10 + 1 != 200) begin
      failures++; $display("FAIL 200 words took %0d cycles", (t_last - t_first) / 10 + 1);
    end
    // gaps and back-pressure
    gaps = 1;
    fork
      forever @(negedge clk) m_tready = ($urandom_range(3) != 0);
    join_none
    for (int i = 0; i < 200; i++) begin
      while ($urandom_range(3) == 0) begin s_tvalid = 0; @(negedge clk); end
      send($urandom_range(NC - 1), $urandom_range(1), 0);
    end
    s_tvalid = 0;
    wait (exp_q.size() == 0);
    checks++;
    if (n_sat == 0 || n_plain == 0) begin failures++; $display("FAIL saturation cases %0d/%0d", n_sat, n_plain); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
