// spead_recv: SPEAD packet receiver (header removal and side channel).
//
// Each UDP payload from the 100G network kernel is one SPEAD packet holding
// one channel of one array element. The packet starts with a 96-byte header:
// 8 fixed bytes (0x53 0x04 0x02 0x06, two reserved zero bytes, then the
// 16-bit item count 0x000b) and 11 item pointers of 8
// bytes (16-bit id, 48-bit big-endian value). The kernel checks the fixed
// bytes, takes timestamp, channel id and element id out of the header and
// presents them on the 128-bit TUSER side channel of every payload word, and
// strips the header. Because 96 is not a multiple of 64, each output word is
// stitched together from the upper half of one input word and the lower half
// of the next.
//
// Interface: s_* is the byte stream from the network (tkeep marks valid
// bytes of the last word), m_* the payload stream in 512-bit words with tuser
// and tlast. Packets whose fixed header is wrong, or that end inside the
// header, are dropped and counted in bad_pkts. A packet whose last word has
// any of its upper 32 bytes valid (payload not a multiple of 64 bytes) is
// also counted there; its payload has already been passed on, and the bytes
// beyond the last full 64 are cut off. Only tkeep[63:32] is examined: in a packet of this format the
// lower 32 bytes of every word are always valid, so tkeep[31:0] carries no
// information and is deliberately left unconnected.
//
// Timing: one word per cycle (interval 1). A payload word leaves one cycle
// after the input word that completes it; the output register is a single
// stage with ready back-pressure.
//
// From the source design: the header layout (fixed bytes and the first four
// item ids) and the side channel. This design's choice: which items hold
// timestamp, channel id and element id (items 4, 7 and 8), and that the
// payload length is a multiple of 64 bytes so the last input word carries
// 32 valid bytes.
module spead_recv
  import bf_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // network side
  input  word_t             s_tdata,
  input  logic [KEEP_W-1:0] s_tkeep,
  input  logic              s_tlast,
  input  logic              s_tvalid,
  output logic              s_tready,
  // payload side
  output word_t             m_tdata,
  output side_t             m_tuser,
  output logic              m_tlast,
  output logic              m_tvalid,
  input  logic              m_tready,
  // status
  output logic [31:0]       pkts,
  output logic [31:0]       bad_pkts
);

  typedef enum logic [1:0] {S_HDR0, S_HDR1, S_PAY, S_DROP} state_t;
  state_t state;

  logic [DWIDTH/2-1:0] hold;   // upper half of the previous input word
  side_t               side;
  logic                fire;

  assign s_tready = !m_tvalid || m_tready;
  assign fire     = s_tvalid && s_tready;

  function automatic logic header_ok(word_t w);
    return byte_of(w, 0) == SPEAD_MAGIC   && byte_of(w, 1) == SPEAD_VERSION &&
           byte_of(w, 2) == SPEAD_ITEMW   && byte_of(w, 3) == SPEAD_ADDRW   &&
           byte_of(w, 4) == 8'h00         && byte_of(w, 5) == 8'h00         &&
           byte_of(w, 6) == 8'h00         && byte_of(w, 7) == 8'(SPEAD_NITEMS);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_HDR0;
      m_tvalid <= 1'b0;
      m_tlast  <= 1'b0;
      m_tdata  <= '0;
      m_tuser  <= '0;
      hold     <= '0;
      side     <= '0;
      pkts     <= '0;
      bad_pkts <= '0;
    end else begin
      if (m_tready) m_tvalid <= 1'b0;
      if (fire) begin
        unique case (state)
          S_HDR0: begin
            // items 0..6 sit at bytes 8..63 of the first word
            side.timestamp <= 64'(item_value(s_tdata, 8 + 8*IT_TIMESTAMP));
            if (s_tlast) begin
              bad_pkts <= bad_pkts + 1;
            end else if (header_ok(s_tdata)) begin
              state <= S_HDR1;
            end else begin
              bad_pkts <= bad_pkts + 1;
              state    <= S_DROP;
            end
          end
          S_HDR1: begin
            // items 7..10 sit at bytes 0..31 of the second word
            side.channel_id <= item_value(s_tdata, 8*(IT_CHANNEL - 7))[31:0];
            side.element_id <= item_value(s_tdata, 8*(IT_ELEMENT - 7))[31:0];
            hold            <= s_tdata[DWIDTH-1:DWIDTH/2];
            if (s_tlast) begin
              bad_pkts <= bad_pkts + 1;
              state    <= S_HDR0;
            end else begin
              state <= S_PAY;
            end
          end
          S_PAY: begin
            m_tdata  <= {s_tdata[DWIDTH/2-1:0], hold};
            m_tuser  <= side;
            m_tlast  <= s_tlast;
            m_tvalid <= 1'b1;
            hold     <= s_tdata[DWIDTH-1:DWIDTH/2];
            if (s_tlast) begin
              state <= S_HDR0;
              // a last word with more than 32 valid bytes breaks the
              // 64-byte payload rule: the packet is flagged, not extended
              if (s_tkeep[KEEP_W-1:KEEP_W/2] != '0) bad_pkts <= bad_pkts + 1;
              else                                   pkts     <= pkts + 1;
            end
          end
          S_DROP: if (s_tlast) state <= S_HDR0;
          default: state <= S_HDR0;
        endcase
      end
    end
  end

  // The output register is only overwritten once it has been taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata));

endmodule
