// spead_send: packs beam packets into SPEAD packets for the network.
//
// Each incoming packet (PKT_WORDS words of 32 time samples of one beam and
// one channel, with the side channel) becomes one SPEAD packet: a 96-byte
// header, 8 fixed bytes (0x53 0x04 0x02 0x06, two reserved zero bytes, the
// 16-bit item count 0x000b) and 11 item pointers,
// followed by the payload. The header ends halfway through the second
// 512-bit word, so the payload is shifted by 32 bytes: every output word
// after the first is the upper half of one payload word and the lower half
// of the next, and a final word carries the last 32 payload bytes with the
// upper half of tkeep clear.
//
// Item values: heap id = running packet count, heap size and payload length
// = payload bytes of the packet, heap offset 0, timestamp, clipping count 0,
// order vector 0, channel id, beam id (item 8), items 9 and 10 zero. All
// fields are big-endian on the wire; byte 0 of a word is bits [7:0].
//
// Timing: one output word per cycle; a packet of N payload words takes N+2
// cycles. The output register stalls on back-pressure.
//
// From the source design: the header layout and that each output packet
// holds one channel and one beam. This design's choice: the ids and values
// of the items after the fourth, and the payload length of PKT_WORDS words.
module spead_send
  import bf_pkg::*;
#(
  parameter int PKT_WORDS = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  word_t             s_tdata,
  input  side_t             s_tuser,
  input  logic              s_tlast,
  input  logic              s_tvalid,
  output logic              s_tready,
  output word_t             m_tdata,
  output logic [KEEP_W-1:0] m_tkeep,
  output logic              m_tlast,
  output logic              m_tvalid,
  input  logic              m_tready,
  output logic [31:0]       pkts
);

  localparam logic [47:0] PAY_BYTES = 48'(PKT_WORDS * DWIDTH / 8);

  typedef enum logic [1:0] {S_H0, S_H1, S_PAY, S_TAIL} state_t;
  state_t state;

  logic [DWIDTH/2-1:0] hold;
  logic                advance;
  assign advance  = !m_tvalid || m_tready;
  assign s_tready = advance && (state == S_H1 || state == S_PAY);

  logic [SPEAD_NITEMS-1:0][47:0] val;
  always_comb begin
    val                = '0;
    val[IT_HEAP_ID]    = 48'(pkts);
    val[IT_HEAP_SIZE]  = PAY_BYTES;
    val[IT_HEAP_OFF]   = '0;
    val[IT_PAY_LEN]    = PAY_BYTES;
    val[IT_TIMESTAMP]  = s_tuser.timestamp[47:0];
    val[IT_CHANNEL]    = 48'(s_tuser.channel_id);
    val[IT_ELEMENT]    = 48'(s_tuser.element_id);
  end

  word_t hdr0;
  logic [DWIDTH/2-1:0] hdr1;
  always_comb begin
    hdr0 = '0;
    hdr0[63:0] = {8'(SPEAD_NITEMS), 24'h000000, SPEAD_ADDRW, SPEAD_ITEMW, SPEAD_VERSION, SPEAD_MAGIC};
    for (int i = 0; i < 7; i++) hdr0[64*(i+1) +: 64] = item_bytes(ITEM_ID[i], val[i]);
    hdr1 = '0;
    for (int i = 7; i < SPEAD_NITEMS; i++) hdr1[64*(i-7) +: 64] = item_bytes(ITEM_ID[i], val[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_H0;
      hold     <= '0;
      m_tdata  <= '0;
      m_tkeep  <= '0;
      m_tlast  <= 1'b0;
      m_tvalid <= 1'b0;
      pkts     <= '0;
    end else if (advance) begin
      m_tvalid <= 1'b0;
      unique case (state)
        S_H0: if (s_tvalid) begin
          m_tdata  <= hdr0;
          m_tkeep  <= '1;
          m_tlast  <= 1'b0;
          m_tvalid <= 1'b1;
          state    <= S_H1;
        end
        S_H1, S_PAY: if (s_tvalid) begin
          m_tdata  <= (state == S_H1) ? {s_tdata[DWIDTH/2-1:0], hdr1}
                                      : {s_tdata[DWIDTH/2-1:0], hold};
          m_tkeep  <= '1;
          m_tlast  <= 1'b0;
          m_tvalid <= 1'b1;
          hold     <= s_tdata[DWIDTH-1:DWIDTH/2];
          state    <= s_tlast ? S_TAIL : S_PAY;
        end
        S_TAIL: begin
          m_tdata  <= {{(DWIDTH/2){1'b0}}, hold};
          m_tkeep  <= {{(KEEP_W/2){1'b0}}, {(KEEP_W/2){1'b1}}};
          m_tlast  <= 1'b1;
          m_tvalid <= 1'b1;
          pkts     <= pkts + 1;
          state    <= S_H0;
        end
        default: state <= S_H0;
      endcase
    end
  end

endmodule
