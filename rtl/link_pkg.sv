// link_pkg: shared types, constants and functions of the lightweight serial
// link (a stripped-down replacement for a 25G Ethernet MAC/PCS).
//
// The link moves 64-bit words. Each word travels as a 66-bit block: a 2-bit
// sync header says whether the 64-bit payload is a data word or a control
// word. A control word carries two flag bits {H,T} in bits [63:62]:
//   00 idle (gap between or inside packets; the other 62 bits are a
//      programmable idle pattern, e.g. a link identifier)
//   10 header  (start of packet)
//   01 trailer (end of packet)
//   11 trailer of the packet that ends and header of the one that starts.
// Byte i of a word is bits [8i+7:8i]. The trailer field is bytes 0..4
// (bits [39:0]) and the header field bytes 5..7 (bits [63:40]), so a trailer
// and a header can share one control word; the two flags take the top two
// bits of the header field, leaving it 22 bits. The trailer holds a CRC-32 of
// the packet's data words in bits [31:0]; bits [39:32] are sent as zero.
// Flag encoding, 64-bit unit and field byte positions follow the published
// framing; the flag bit positions, sync header values, CRC choice and bit
// order are this design's own choices.
package link_pkg;

  localparam int unsigned WORD_W  = 64;   // payload of one block
  localparam int unsigned BLOCK_W = 66;   // 64b/66b block
  localparam int unsigned HDR_W   = 22;   // header field after the flags
  localparam int unsigned IDLE_W  = 62;   // idle pattern after the flags

  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [BLOCK_W-1:0] block_t;
  typedef logic [HDR_W-1:0]   hdr_t;
  typedef logic [IDLE_W-1:0]  idle_t;

  // Sync header, in block bits [1:0]; bit 0 is sent first.
  localparam logic [1:0] SYNC_DATA = 2'b01;
  localparam logic [1:0] SYNC_CTRL = 2'b10;

  // Control-word flavours, {H,T} in bits [63:62].
  typedef enum logic [1:0] {
    CW_IDLE    = 2'b00,
    CW_TRAILER = 2'b01,
    CW_HEADER  = 2'b10,
    CW_HDR_TRL = 2'b11
  } cw_kind_e;

  // Self-synchronising scrambler polynomial 1 + x^39 + x^58: taps S38 and S57.
  localparam int unsigned SCR_LEN = 58;
  localparam int unsigned SCR_TAP = 39;

  // CRC-32 (IEEE polynomial, reflected form 0xEDB88320), initial value and
  // final inversion all-ones. Data are fed bit 0 of byte 0 first.
  localparam logic [31:0] CRC_POLY_R = 32'hEDB8_8320;
  localparam logic [31:0] CRC_INIT   = 32'hFFFF_FFFF;

  function automatic logic [31:0] crc32_word(input logic [31:0] crc,
                                             input word_t       d);
    logic [31:0] c;
    c = crc;
    for (int i = 0; i < WORD_W; i++) begin
      if (c[0] ^ d[i]) c = (c >> 1) ^ CRC_POLY_R;
      else             c = c >> 1;
    end
    return c;
  endfunction

  function automatic word_t make_ctrl(input cw_kind_e kind, input hdr_t hdr,
                                      input logic [31:0] crc);
    word_t w;
    w = '0;
    w[63:62] = kind;
    if (kind[1]) w[61:40] = hdr;
    if (kind[0]) w[31:0]  = crc;
    return w;
  endfunction

  function automatic word_t make_idle(input idle_t pattern);
    return {CW_IDLE, pattern};
  endfunction

endpackage
