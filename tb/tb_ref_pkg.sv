// tb_ref_pkg: reference models for the link testbenches, written bit by bit
// and byte by byte, independently of the RTL's parallel forms.
//   ref_scramble / ref_descramble: 1 + x^39 + x^58, one bit at a time, with
//     the history kept as "bit sent k+1 bits ago" in hist[k].
//   ref_crc32: CRC-32 over the bytes of a packet (byte 0 of each word first),
//     the standard reflected algorithm, finalised (inverted).
//   cw: builds a control word: {H,T} in [63:62], header [61:40], CRC [31:0].
package tb_ref_pkg;

  typedef logic [63:0] w64_t;

  function automatic w64_t ref_scramble(ref logic [57:0] hist, input w64_t d);
    w64_t o;
    for (int i = 0; i < 64; i++) begin
      o[i] = d[i] ^ hist[38] ^ hist[57];
      hist = {hist[56:0], o[i]};
    end
    return o;
  endfunction

  function automatic w64_t ref_descramble(ref logic [57:0] hist, input w64_t d);
    w64_t o;
    for (int i = 0; i < 64; i++) begin
      o[i] = d[i] ^ hist[38] ^ hist[57];
      hist = {hist[56:0], d[i]};
    end
    return o;
  endfunction

  function automatic logic [31:0] ref_crc32(input w64_t words[$]);
    logic [31:0] c;
    logic [7:0]  b;
    c = 32'hFFFF_FFFF;
    foreach (words[k])
      for (int by = 0; by < 8; by++) begin
        b = words[k][8*by +: 8];
        c = c ^ {24'h0, b};
        for (int j = 0; j < 8; j++)
          c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
      end
    return ~c;
  endfunction

  function automatic w64_t cw(input logic h, input logic t,
                              input logic [21:0] hdr, input logic [31:0] crc);
    w64_t w;
    w = '0;
    w[63] = h;
    w[62] = t;
    if (h) w[61:40] = hdr;
    if (t) w[31:0] = crc;
    return w;
  endfunction

  function automatic w64_t idle_w(input logic [61:0] pat);
    return {2'b00, pat};
  endfunction

  function automatic int popcount64(input w64_t w);
    int n;
    n = 0;
    for (int i = 0; i < 64; i++) n += int'(w[i]);
    return n;
  endfunction

endpackage
