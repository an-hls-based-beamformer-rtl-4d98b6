// bf_pkg: types and constants shared by the beamformer kernels.
//
// All kernels exchange 512-bit AXI4-Stream words. A word carries LANES = 32
// complex samples of 2*W = 16 bits each: lane i occupies bits [16i+15:16i],
// with the real part in the low byte and the imaginary part in the high byte
// (two's complement). The 128-bit TUSER side channel carries the packet's
// timestamp, channel id and element (or beam) id, as in the streams of the
// original HLS kernels (ap_axiu<512,128,0,0>). The split of those 128 bits
// into 64/32/32 is this design's choice.
package bf_pkg;

  localparam int DWIDTH    = 512;            // stream data width
  localparam int W         = 8;              // bits per real / imaginary part
  localparam int SAMPLE_W  = 2 * W;          // one complex sample
  localparam int LANES     = DWIDTH / SAMPLE_W; // complex samples per word (32)
  localparam int UWIDTH    = 128;            // side-channel width
  localparam int KEEP_W    = DWIDTH / 8;     // byte enables of a network word

  // SPEAD header: 8 bytes of fixed header followed by 11 item pointers of
  // 8 bytes each (0x53 0x04 0x02 0x06 0x0000 0x000b), i.e. 96 bytes.
  localparam logic [7:0] SPEAD_MAGIC   = 8'h53;
  localparam logic [7:0] SPEAD_VERSION = 8'h04;
  localparam logic [7:0] SPEAD_ITEMW   = 8'h02;
  localparam logic [7:0] SPEAD_ADDRW   = 8'h06;
  localparam int         SPEAD_NITEMS  = 11;
  localparam int         SPEAD_HDR_BYTES = 8 + 8 * SPEAD_NITEMS; // 96

  // Item pointers of the SPEAD header, in the order they appear. The first
  // four ids are the standard SPEAD ones; the ids of the remaining items are
  // this design's choice.
  localparam int IT_HEAP_ID   = 0;  // 0x8001
  localparam int IT_HEAP_SIZE = 1;  // 0x8002
  localparam int IT_HEAP_OFF  = 2;  // 0x8003
  localparam int IT_PAY_LEN   = 3;  // 0x8004
  localparam int IT_TIMESTAMP = 4;
  localparam int IT_CLIP_CNT  = 5;
  localparam int IT_ORDER_VEC = 6;
  localparam int IT_CHANNEL   = 7;
  localparam int IT_ELEMENT   = 8;  // element id, or beam id on output
  localparam logic [15:0] ITEM_ID [SPEAD_NITEMS] = '{
    16'h8001, 16'h8002, 16'h8003, 16'h8004, 16'h9600, 16'h9601,
    16'h9602, 16'h9603, 16'h9604, 16'h0000, 16'h0000};

  typedef struct packed {
    logic [63:0] timestamp;
    logic [31:0] channel_id;
    logic [31:0] element_id;   // element id, or beam id after beamforming
  } side_t;

  typedef logic [DWIDTH-1:0] word_t;

  // Complex sample helpers.
  function automatic logic signed [W-1:0] lane_re(word_t w, int i);
    return w[SAMPLE_W*i +: W];
  endfunction
  function automatic logic signed [W-1:0] lane_im(word_t w, int i);
    return w[SAMPLE_W*i + W +: W];
  endfunction

  // Byte b of a 512-bit word (byte 0 is the first on the wire).
  function automatic logic [7:0] byte_of(word_t w, int b);
    return w[8*b +: 8];
  endfunction

  // 48-bit value of the item pointer starting at byte offset base of w.
  // SPEAD fields are big-endian: the byte after the 16-bit id is the most
  // significant byte of the value.
  function automatic logic [47:0] item_value(word_t w, int base);
    logic [47:0] v;
    for (int k = 0; k < 6; k++) v[8*(5-k) +: 8] = w[8*(base+2+k) +: 8];
    return v;
  endfunction

  // One 8-byte item pointer in wire order, placed into bytes [7:0] of the
  // result as they would sit in a stream word (byte 0 in bits [7:0]).
  function automatic logic [63:0] item_bytes(logic [15:0] id, logic [47:0] v);
    logic [63:0] r;
    r[7:0]   = id[15:8];
    r[15:8]  = id[7:0];
    for (int k = 0; k < 6; k++) r[8*(2+k) +: 8] = v[8*(5-k) +: 8];
    return r;
  endfunction

endpackage
