// tb_spead_send: feeds beam packets into the sender with random gaps and
// back-pressure, reassembles the output bytes using tkeep, and compares each
// whole packet with one built byte by byte from the expected header
// (heap id = packet count, sizes = payload bytes, timestamp, channel, beam)
// and the payload. Without gaps, packets must follow each other every
// PKT_WORDS + 2 cycles.
module tb_spead_send;
  import bf_pkg::*;
  import spead_tb_pkg::*;

  localparam int PW = 64;

  logic clk = 0, rst_n;
  word_t s_tdata, m_tdata;
  side_t s_tuser;
  logic [63:0] m_tkeep;
  logic s_tlast, s_tvalid, s_tready, m_tlast, m_tvalid, m_tready;
  logic [31:0] pkts;
  int checks = 0, failures = 0;

  spead_send #(.PKT_WORDS(PW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bytes_t exp_pk [$];
  bit gaps = 1;
  int npk = 0;

  task automatic make(longint unsigned ts, int ch, int beam);
    bytes_t pay;
    for (int i = 0; i < 64*PW; i++) pay.push_back($urandom);
    exp_pk.push_back(build(npk, ts & 64'hffff_ffff_ffff, ch, beam, pay));
    npk++;
    for (int w = 0; w < PW; w++) begin
      @(negedge clk);
      while (gaps && $urandom_range(4) == 0) begin s_tvalid = 0; @(negedge clk); end
      s_tvalid = 1;
      for (int b = 0; b < 64; b++) s_tdata[8*b +: 8] = pay[64*w + b];
      s_tuser = '{timestamp: ts, channel_id: ch, element_id: beam};
      s_tlast = (w == PW - 1);
      @(posedge clk);
      while (!s_tready) @(posedge clk);
    end
    @(negedge clk) s_tvalid = 0;
  endtask

  bytes_t cur;
  int starts [$];
  bit in_pkt = 0;
  always @(posedge clk) if (rst_n && m_tvalid && m_tready) begin
    if (!in_pkt) starts.push_back(int'($time));
    in_pkt = 1;
    for (int b = 0; b < 64; b++) if (m_tkeep[b]) cur.push_back(m_tdata[8*b +: 8]);
    if (m_tlast) begin
      bytes_t e;
      e = exp_pk.pop_front();
      checks++;
      if (cur != e) begin
        failures++;
        $display("FAIL packet: %0d bytes, want %0d", cur.size(), e.size());
        for (int i = 0; i < e.size() && i < cur.size(); i++)
          if (cur[i] != e[i]) begin $display("  first difference at byte %0d", i); break; end
      end
      cur.delete();
      in_pkt = 0;
    end
  end

  initial begin
    rst_n = 0; s_tvalid = 0; s_tdata = 0; s_tuser = 0; s_tlast = 0; m_tready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      forever @(negedge clk) m_tready = gaps ? ($urandom_range(3) != 0) : 1'b1;
    join_none
    for (int i = 0; i < 6; i++) make({$urandom, $urandom}, $urandom_range(31), $urandom_range(31));
    wait (exp_pk.size() == 0);
    repeat (5) @(negedge clk);
    gaps = 0;
    starts.delete();
    for (int i = 0; i < 3; i++) make(64'h100 + i, 1, i);
    wait (exp_pk.size() == 0);
    repeat (5) @(negedge clk);
    checks++;
    if (starts.size() != 3 || starts[1] - starts[0] != 10*(PW + 2) || starts[2] - starts[1] != 10*(PW + 2)) begin
      failures++;
      $display("FAIL packet spacing");
    end
    checks++;
    if (pkts != 9) begin failures++; $display("FAIL pkts = %0d", pkts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
