// spead_tb_pkg: SPEAD packet construction and parsing for the testbenches,
// written byte by byte from the packet layout, independently of the RTL:
// bytes 0..7 = 53 04 02 06 00 00 00 0b, then 11 item pointers of 8 bytes
// (2-byte id, 6-byte big-endian value): heap id 0x8001, heap size 0x8002,
// heap offset 0x8003, payload length 0x8004, timestamp 0x9600, clipping
// count 0x9601, order vector 0x9602, channel 0x9603, element/beam 0x9604,
// and two zero items; then the payload.
package spead_tb_pkg;

  typedef byte unsigned bytes_t [$];

  localparam int unsigned IDS [11] = '{'h8001, 'h8002, 'h8003, 'h8004, 'h9600,
                                       'h9601, 'h9602, 'h9603, 'h9604, 0, 0};

  function automatic bytes_t build(longint unsigned heap, longint unsigned ts,
                                   int unsigned ch, int unsigned el, bytes_t pay);
    bytes_t p;
    longint unsigned v [11];
    v = '{heap, pay.size(), 0, pay.size(), ts, 0, 0, ch, el, 0, 0};
    p = '{8'h53, 8'h04, 8'h02, 8'h06, 8'h00, 8'h00, 8'h00, 8'h0b};
    for (int i = 0; i < 11; i++) begin
      p.push_back(IDS[i] >> 8);
      p.push_back(IDS[i] & 'hff);
      for (int k = 5; k >= 0; k--) p.push_back((v[i] >> (8*k)) & 'hff);
    end
    foreach (pay[i]) p.push_back(pay[i]);
    return p;
  endfunction

  // value of item i of a packet
  function automatic longint unsigned item(bytes_t p, int i);
    longint unsigned r = 0;
    for (int k = 0; k < 6; k++) r = (r << 8) | p[8 + 8*i + 2 + k];
    return r;
  endfunction

  function automatic int unsigned item_id(bytes_t p, int i);
    return {p[8 + 8*i], p[8 + 8*i + 1]};
  endfunction

endpackage
