// corner_turner2: (T, F, T, B) -> (T, F, B, T) transpose in on-chip RAM.
//
// The beamformer emits one word per time sample holding that sample of all
// NBEAM beams. For sending, each packet must hold consecutive time samples of
// one beam and one channel. This kernel writes PKT_WORDS*32 beamformed words
// of one channel column-wise into a RAM with one bank per beam (sample t of
// beam b goes to lane t%32 of word t/32 of bank b), then reads the banks out
// whole, beam by beam, as NBEAM packets of PKT_WORDS words. A ping-pong pair
// of RAMs lets one block be read while the next is written.
//
// Interface: AXI4-Stream in and out with the 128-bit side channel. Output
// packet b carries the timestamp of its first sample, the channel id and the
// beam id b in the element field; tlast marks the last word of each packet.
// NBEAM must equal the 32 lanes of a word.
//
// Timing: interval 1 word per cycle, two cycles from read to output (RAM
// read, output register). Reading starts once a whole block is stored.
// From the source design: the transpose and its order. This design's choice:
// the ping-pong RAM organisation.
module corner_turner2
  import bf_pkg::*;
#(
  parameter int NBEAM     = 32,
  parameter int PKT_WORDS = 64,
  localparam int BW  = $clog2(NBEAM),
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

  localparam int NT = PKT_WORDS * LANES;

  word_t         ram [2][NBEAM][PKT_WORDS];
  logic [1:0]    full;
  side_t         blk_side [2];

  logic          wb;
  logic [TW-1:0] w_t;
  logic          w_fire;

  assign s_tready = !full[wb];
  assign w_fire   = s_tvalid && s_tready;

  logic          rb;
  logic [BW-1:0] r_b;
  logic [WW-1:0] r_w;
  logic          advance, r_issue;
  logic          v1, last1;
  side_t         side1;
  word_t         q;

  assign advance = !m_tvalid || m_tready;
  assign r_issue = full[rb] && advance;

  always_ff @(posedge clk) begin
    if (w_fire)
      for (int b = 0; b < NBEAM; b++)
        ram[wb][b][w_t[TW-1:5]][SAMPLE_W*w_t[4:0] +: SAMPLE_W] <= s_tdata[SAMPLE_W*b +: SAMPLE_W];
    if (advance) q <= ram[rb][r_b][r_w];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full     <= '0;
      wb       <= 1'b0;
      w_t      <= '0;
      rb       <= 1'b0;
      r_b      <= '0;
      r_w      <= '0;
      v1       <= 1'b0;
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
        w_t <= w_t + 1'b1;
        if (w_t == 0) blk_side[wb] <= s_tuser;
        if (w_t == TW'(NT - 1)) begin
          w_t      <= '0;
          full[wb] <= 1'b1;
          wb       <= !wb;
        end
      end

      if (advance) begin
        v1    <= r_issue;
        last1 <= (r_w == WW'(PKT_WORDS - 1));
        side1 <= '{timestamp:  blk_side[rb].timestamp,
                   channel_id: blk_side[rb].channel_id,
                   element_id: 32'(r_b)};
        m_tvalid <= v1;
        m_tlast  <= last1;
        m_tuser  <= side1;
        m_tdata  <= q;
      end

      if (r_issue) begin
        r_w <= r_w + 1'b1;
        if (r_w == WW'(PKT_WORDS - 1)) begin
          r_w <= '0;
          r_b <= r_b + 1'b1;
          if (r_b == BW'(NBEAM - 1)) begin
            r_b      <= '0;
            full[rb] <= 1'b0;
            rb       <= !rb;
          end
        end
      end
    end
  end

  // the incoming block ends exactly where the stream says it does
  assert property (@(posedge clk) disable iff (!rst_n)
                   w_fire && s_tlast |-> w_t == TW'(NT - 1));

  initial assert (NBEAM == LANES) else $error("NBEAM must equal LANES");

endmodule
