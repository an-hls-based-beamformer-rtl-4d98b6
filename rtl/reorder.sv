// reorder: packet buffering, packet synchronisation and packet-loss handling.
//
// Packets of one channel and one element arrive from many F-engines over the
// network in no particular order, some late and some never. This kernel
// writes every packet into an external buffer memory (HBM on the card)
// organised as NSLOT time slots x NCHANNEL channels x NELEMENT elements x
// PKT_WORDS words, and tracks which packets of each time slot have arrived.
// Time slots are released strictly in time order. A slot is released when
// all NCHANNEL*NELEMENT packets are in, or earlier when a packet for a time
// NSLOT or more slots ahead arrives (the buffer would overflow: the input
// stalls until the oldest slot is forced out), or while `flush` is high.
// A released slot is read out channel by channel, element by element, i.e.
// in (T, F, E, T) order; a packet that never arrived is sent as zeros and
// counted as lost. Packets older than the slot being released are dropped
// as late; a second copy of a packet already held is dropped as duplicate;
// packets whose channel or element is out of range are dropped as bad.
//
// Time index of a packet = timestamp >> TS_SHIFT (timestamps count samples,
// PKT_WORDS*32 samples per packet). The first packet after reset sets the
// first time slot to release.
//
// Memory port (word addressed, address = {slot, channel, element, word}):
// writes are taken when mem_wr_ready is high; read requests are taken when
// mem_rd_ready is high and answered in order, with any latency, on
// mem_rd_valid/mem_rd_data. A reservation buffer of OUT_DEPTH entries holds
// requested words until the output takes them, so back-pressure on m_* never
// loses data. Reads stream at one word per cycle as long as the memory's
// round trip (request to word leaving the buffer) is no more than OUT_DEPTH
// cycles; the default of 32 is this design's choice, sized for a memory
// latency of up to about 28 cycles.
//
// Timing: input and output each move one word per cycle when not stalled, so
// a packet of PKT_WORDS words passes in PKT_WORDS cycles (the source design
// reports an interval of 64 cycles per packet).
//
// From the source design: buffering in HBM by time and (channel, element),
// in-order release, loss and sync handling. This design's choice: the
// release rules, zero filling, late/duplicate dropping, the flush input and
// the simple memory port in place of an AXI4 master.
module reorder
  import bf_pkg::*;
#(
  parameter int NCHANNEL  = 32,
  parameter int NELEMENT  = 32,
  parameter int PKT_WORDS = 64,
  parameter int NSLOT     = 4,
  parameter int TS_SHIFT  = $clog2(PKT_WORDS * LANES),
  parameter int OUT_DEPTH = 32,
  localparam int CW  = $clog2(NCHANNEL),
  localparam int EW  = $clog2(NELEMENT),
  localparam int WW  = $clog2(PKT_WORDS),
  localparam int SW  = $clog2(NSLOT),
  localparam int AW  = SW + CW + EW + WW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          flush,
  // packets from spead_recv
  input  word_t         s_tdata,
  input  side_t         s_tuser,
  input  logic          s_tlast,
  input  logic          s_tvalid,
  output logic          s_tready,
  // ordered stream to the corner turner
  output word_t         m_tdata,
  output side_t         m_tuser,
  output logic          m_tlast,
  output logic          m_tvalid,
  input  logic          m_tready,
  // buffer memory
  output logic          mem_wr_en,
  output logic [AW-1:0] mem_wr_addr,
  output word_t         mem_wr_data,
  input  logic          mem_wr_ready,
  output logic          mem_rd_en,
  output logic [AW-1:0] mem_rd_addr,
  input  logic          mem_rd_ready,
  input  word_t         mem_rd_data,
  input  logic          mem_rd_valid,
  // status counters
  output logic [31:0]   pkts_in,
  output logic [31:0]   late_pkts,
  output logic [31:0]   dup_pkts,
  output logic [31:0]   bad_pkts,
  output logic [31:0]   lost_pkts,
  output logic [31:0]   frames_out,
  output logic [31:0]   forced_frames,
  output logic [31:0]   stall_cycles
);

  localparam int NPKT = NCHANNEL * NELEMENT;
  localparam int NW   = $clog2(NPKT + 1);
  localparam int DW   = $clog2(OUT_DEPTH);

  typedef logic [47:0] tidx_t;

  // ---------------------------------------------------------------- state
  logic                      started;
  tidx_t                     t_out;          // oldest slot not yet released
  logic [NSLOT-1:0][NPKT-1:0] have;          // packet present
  logic [NW-1:0]             cnt [NSLOT];    // packets present per slot

  // ---------------------------------------------------------------- input
  typedef enum logic [1:0] {I_IDLE, I_WRITE, I_DROP} in_t;
  in_t                   in_mode;
  logic [AW-WW-1:0]      in_base;   // {slot, ch, el} of the packet in flight
  logic [WW-1:0]         in_word;

  tidx_t                 h_tidx;
  logic [31:0]           h_ch, h_el;
  logic                  h_bad, h_late, h_over, h_dup;
  logic [SW-1:0]         h_slot;
  logic [CW+EW-1:0]      h_pkt;

  logic                  draining;
  logic                  drain_go;

  always_comb begin
    h_tidx = tidx_t'(s_tuser.timestamp >> TS_SHIFT);
    h_ch   = s_tuser.channel_id;
    h_el   = s_tuser.element_id;
    h_slot = SW'(h_tidx);
    h_pkt  = {CW'(h_ch), EW'(h_el)};
    h_bad  = (h_ch >= NCHANNEL) || (h_el >= NELEMENT);
    h_late = started && ((h_tidx < t_out) || (h_tidx == t_out && draining));
    h_over = started && (h_tidx >= t_out + tidx_t'(NSLOT));
    h_dup  = started && have[h_slot][h_pkt];
  end

  // a first word that must wait for the oldest slot to leave
  logic first_stall;
  assign first_stall = (in_mode == I_IDLE) && s_tvalid && !h_bad && !h_late && h_over;

  logic first_write;
  assign first_write = (in_mode == I_IDLE) && !h_bad && !h_late && !h_over && !h_dup;

  logic in_writes;   // this input word goes to memory
  assign in_writes = (in_mode == I_WRITE) || first_write;

  assign s_tready = !first_stall && (!in_writes || mem_wr_ready);

  logic in_fire;
  assign in_fire = s_tvalid && s_tready;

  assign mem_wr_en   = s_tvalid && in_writes && !first_stall;
  assign mem_wr_data = s_tdata;
  assign mem_wr_addr = (in_mode == I_IDLE) ? {h_slot, h_pkt, WW'(0)} : {in_base, in_word};

  // packet completion: sets the presence bit of its slot
  logic                 set_have;
  logic [SW-1:0]        set_slot;
  logic [CW+EW-1:0]     set_pkt;
  assign set_have = in_fire && in_writes && s_tlast;
  assign set_slot = (in_mode == I_IDLE) ? h_slot : in_base[AW-WW-1 -: SW];
  assign set_pkt  = (in_mode == I_IDLE) ? h_pkt  : in_base[CW+EW-1:0];

  // ---------------------------------------------------------------- drain
  logic [CW-1:0]  d_ch;
  logic [EW-1:0]  d_el;
  logic [WW-1:0]  d_w;
  logic [SW-1:0]  d_slot;
  logic           d_zero;     // current packet is missing
  logic           forcing;

  // reservation buffer
  word_t          rb_data [OUT_DEPTH];
  logic           rb_zero [OUT_DEPTH];
  logic           rb_last [OUT_DEPTH];
  side_t          rb_side [OUT_DEPTH];
  logic [DW:0]    rb_wp, rb_fp, rb_rp;   // issue, fill and read pointers

  logic rb_space, issue, d_last_word, d_last_pkt;
  assign rb_space    = (rb_wp - rb_rp) < (DW+1)'(OUT_DEPTH);
  assign issue       = draining && rb_space && mem_rd_ready;
  assign mem_rd_en   = draining && rb_space;
  assign mem_rd_addr = {d_slot, d_ch, d_el, d_w};
  assign d_last_word = (d_w == WW'(PKT_WORDS - 1));
  assign d_last_pkt  = (d_ch == CW'(NCHANNEL - 1)) && (d_el == EW'(NELEMENT - 1));

  // release decision for the oldest slot
  logic full_slot;
  assign full_slot = cnt[SW'(t_out)] == NW'(NPKT);
  assign forcing   = first_stall || flush;
  // a forced release waits for a packet of that slot still being written
  logic busy_out;
  assign busy_out  = (in_mode == I_WRITE && in_base[AW-WW-1 -: SW] == SW'(t_out)) ||
                     (set_have && set_slot == SW'(t_out));
  assign drain_go  = started && !draining && !busy_out && (full_slot || forcing);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      started       <= 1'b0;
      t_out         <= '0;
      have          <= '0;
      for (int i = 0; i < NSLOT; i++) cnt[i] <= '0;
      in_mode       <= I_IDLE;
      in_base       <= '0;
      in_word       <= '0;
      draining      <= 1'b0;
      d_ch          <= '0;
      d_el          <= '0;
      d_w           <= '0;
      d_slot        <= '0;
      d_zero        <= 1'b0;
      rb_wp         <= '0;
      rb_fp         <= '0;
      rb_rp         <= '0;
      pkts_in       <= '0;
      late_pkts     <= '0;
      dup_pkts      <= '0;
      bad_pkts      <= '0;
      lost_pkts     <= '0;
      frames_out    <= '0;
      forced_frames <= '0;
      stall_cycles  <= '0;
    end else begin
      // ---- input side
      if (first_stall) stall_cycles <= stall_cycles + 1;
      if (in_fire) begin
        if (in_mode == I_IDLE) begin
          if (!started && !h_bad) begin
            started <= 1'b1;
            t_out   <= h_tidx;
          end
          if (h_bad)       bad_pkts  <= bad_pkts + 1;
          else if (h_late) late_pkts <= late_pkts + 1;
          else if (h_dup)  dup_pkts  <= dup_pkts + 1;
          else             pkts_in   <= pkts_in + 1;
          in_base <= {h_slot, h_pkt};
          in_word <= WW'(1);
          if (!s_tlast) in_mode <= first_write ? I_WRITE : I_DROP;
        end else begin
          in_word <= in_word + 1'b1;
          if (s_tlast) in_mode <= I_IDLE;
        end
      end

      // ---- drain start
      if (drain_go) begin
        draining <= 1'b1;
        d_slot   <= SW'(t_out);
        d_ch     <= '0;
        d_el     <= '0;
        d_w      <= '0;
        d_zero   <= !have[SW'(t_out)][0];
        if (!full_slot) forced_frames <= forced_frames + 1;
      end

      // ---- drain: one read request per cycle
      if (issue) begin
        rb_zero[rb_wp[DW-1:0]] <= d_zero;
        rb_last[rb_wp[DW-1:0]] <= d_last_word;
        rb_side[rb_wp[DW-1:0]] <= '{timestamp:  64'(t_out) << TS_SHIFT,
                                    channel_id: 32'(d_ch),
                                    element_id: 32'(d_el)};
        rb_wp <= rb_wp + 1'b1;
        d_w   <= d_w + 1'b1;
        if (d_last_word) begin
          have[d_slot][{d_ch, d_el}] <= 1'b0;
          if (d_zero) lost_pkts <= lost_pkts + 1;
          {d_ch, d_el} <= {d_ch, d_el} + 1'b1;
          d_zero       <= !have[d_slot][{d_ch, d_el} + 1'b1];
          if (d_last_pkt) begin
            draining    <= 1'b0;
            cnt[d_slot] <= '0;
            t_out       <= t_out + 1'b1;
            frames_out  <= frames_out + 1;
          end
        end
      end

      // presence bookkeeping of arriving packets (never the draining slot:
      // packets for it are dropped as late)
      if (set_have) begin
        have[set_slot][set_pkt] <= 1'b1;
        cnt[set_slot]           <= cnt[set_slot] + 1'b1;
      end

      // ---- memory responses fill the reservation buffer in order
      if (mem_rd_valid) begin
        rb_data[rb_fp[DW-1:0]] <= rb_zero[rb_fp[DW-1:0]] ? '0 : mem_rd_data;
        rb_fp <= rb_fp + 1'b1;
      end

      // ---- output
      if (m_tvalid && m_tready) rb_rp <= rb_rp + 1'b1;
    end
  end

  assign m_tvalid = (rb_fp != rb_rp);
  assign m_tdata  = rb_data[rb_rp[DW-1:0]];
  assign m_tuser  = rb_side[rb_rp[DW-1:0]];
  assign m_tlast  = rb_last[rb_rp[DW-1:0]];

  // a read answer always belongs to a request already made
  assert property (@(posedge clk) disable iff (!rst_n) mem_rd_valid |-> rb_fp != rb_wp);
  // the draining slot never receives packets
  assert property (@(posedge clk) disable iff (!rst_n)
                   set_have && draining |-> set_slot != d_slot);

endmodule
