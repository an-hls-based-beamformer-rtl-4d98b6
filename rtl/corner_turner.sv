// corner_turner: (T, F, E, T) -> (T, F, T, E) transpose in on-chip RAM.
//
// The reorder kernel delivers, for each time slot and channel, NELEMENT
// packets one after the other, each holding PKT_WORDS*32 consecutive time
// samples of one element. The beamformer needs the opposite order: one word
// per time sample holding that sample of all elements. This kernel writes
// the packets of one channel into a RAM with one bank per element (packet
// words stored whole, bank = element id), then reads it out column by
// column: output word t takes lane t%32 of word t/32 from every bank. Two
// such RAMs work as a ping-pong pair, so one channel is read out while the
// next one is written and the kernel sustains one word per cycle.
//
// Interface: AXI4-Stream in and out with the 128-bit side channel. Output
// word t of a channel carries timestamp = packet timestamp + t, the channel
// id and element id 0; tlast marks the last of the PKT_WORDS*32 words of the
// channel. NELEMENT must equal the 32 lanes of a word.
//
// Timing: interval 1 word per cycle; a word leaves two cycles after its read
// is issued (synchronous RAM read, then lane select into the output
// register). Reading of a channel starts once all NELEMENT packets of it are
// stored. The source design reports a 3-cycle, interval-1 pipeline for its
// corner turner; the ping-pong organisation is this design's choice.
module corner_turner
  import bf_pkg::*;
#(
  parameter int NELEMENT  = 32,
  parameter int PKT_WORDS = 64,
  localparam int EW  = $clog2(NELEMENT),
  localparam int WW  = $clog2(PKT_WORDS),
  localparam int TW  = $clog2(PKT_WORDS * LANES)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t s_tdata,
  input  side_t s_tuser,
  input  logic  s_tlast,
  input  logic  s_tvalid,
  output logic  s_tready,
  output word_t m_tdata,
  output side_t m_tuser,
  output logic  m_tlast,
  output logic  m_tvalid,
  input  logic  m_tready
);

  localparam int NT = PKT_WORDS * LANES;   // time samples per channel block

  word_t         ram [2][NELEMENT][PKT_WORDS];
  logic [1:0]    full;
  side_t         blk_side [2];

  // ---------------------------------------------------------------- write
  logic          wb;
  logic [WW-1:0] w_word;
  logic [EW:0]   w_pkts;
  logic          w_fire;

  assign s_tready = !full[wb];
  assign w_fire   = s_tvalid && s_tready;

  // ---------------------------------------------------------------- read
  logic          rb;
  logic [TW-1:0] r_t;
  logic          advance, r_issue;
  logic          v1;          // stage 1 holds bank words
  logic [4:0]    lane1;
  logic          last1;
  side_t         side1;
  word_t         bank_q [NELEMENT];

  assign advance = !m_tvalid || m_tready;
  assign r_issue = full[rb] && advance;

  always_ff @(posedge clk) begin
    if (w_fire) ram[wb][s_tuser.element_id[EW-1:0]][w_word] <= s_tdata;
    if (advance)
      for (int e = 0; e < NELEMENT; e++) bank_q[e] <= ram[rb][e][r_t[TW-1:5]];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full     <= '0;
      wb       <= 1'b0;
      w_word   <= '0;
      w_pkts   <= '0;
      rb       <= 1'b0;
      r_t      <= '0;
      v1       <= 1'b0;
      lane1    <= '0;
      last1    <= 1'b0;
      side1    <= '0;
      m_tvalid <= 1'b0;
      m_tlast  <= 1'b0;
      m_tuser  <= '0;
      m_tdata  <= '0;
      blk_side[0] <= '0;
      blk_side[1] <= '0;
    end else begin
      if (w_fire) begin
        w_word <= w_word + 1'b1;
        if (w_pkts == 0 && w_word == 0) blk_side[wb] <= s_tuser;
        if (s_tlast) begin
          w_word <= '0;
          if (w_pkts == (EW+1)'(NELEMENT - 1)) begin
            w_pkts   <= '0;
            full[wb] <= 1'b1;
            wb       <= !wb;
          end else begin
            w_pkts <= w_pkts + 1'b1;
          end
        end
      end

      if (advance) begin
        v1    <= r_issue;
        lane1 <= r_t[4:0];
        last1 <= (r_t == TW'(NT - 1));
        side1 <= '{timestamp:  blk_side[rb].timestamp + 64'(r_t),
                   channel_id: blk_side[rb].channel_id,
                   element_id: '0};
        m_tvalid <= v1;
        m_tlast  <= last1;
        m_tuser  <= side1;
        for (int e = 0; e < NELEMENT; e++)
          m_tdata[SAMPLE_W*e +: SAMPLE_W] <= bank_q[e][SAMPLE_W*lane1 +: SAMPLE_W];
      end

      if (r_issue) begin
        r_t <= r_t + 1'b1;
        if (r_t == TW'(NT - 1)) begin
          r_t      <= '0;
          full[rb] <= 1'b0;
          rb       <= !rb;
        end
      end
    end
  end

  initial assert (NELEMENT == LANES) else $error("NELEMENT must equal LANES");

endmodule
