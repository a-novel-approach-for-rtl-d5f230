// Reference models shared by the testbenches: a byte-serial CRC-32 written
// independently of the design's word-wide one, a reference LFSR-free packet
// builder and helpers to take packets apart.
package tb_ref_pkg;

  // CRC-32 (IEEE 802.3, reflected) advanced by one byte
  function automatic logic [31:0] crc_byte(logic [31:0] c, logic [7:0] b);
    c ^= {24'b0, b};
    repeat (8) c = (c >> 1) ^ (32'hEDB88320 & {32{c[0]}});
    return c;
  endfunction

  // CRC of a list of words, each fed least significant byte first
  function automatic logic [31:0] crc_words(logic [31:0] w[$]);
    logic [31:0] c = 32'hFFFFFFFF;
    foreach (w[i])
      for (int b = 0; b < 4; b++) c = crc_byte(c, w[i][8*b +: 8]);
    return c;
  endfunction

  function automatic logic [31:0] header(int dest, int src, int len);
    return (32'(dest) << 22) | (32'(src) << 12) | (32'(len) << 6);
  endfunction

  // a well-formed packet: header, stamp, payload, CRC tail
  function automatic void build(int dest, int src, int len, logic [31:0] stamp,
                                ref logic [31:0] w[$]);
    w = {};
    w.push_back(header(dest, src, len));
    w.push_back(stamp);
    for (int i = 0; i < len - 3; i++) w.push_back($urandom);
    w.push_back(crc_words(w));
  endfunction

endpackage
