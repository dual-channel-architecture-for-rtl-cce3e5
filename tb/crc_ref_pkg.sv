// crc_ref_pkg: reference Ethernet CRC-32 for the testbenches, written the
// textbook way (one byte at a time, reflected polynomial 0xEDB88320, start at
// all ones, complement at the end) and independent of the design's
// word-at-a-time function. The CRC of the ASCII string "123456789" is
// 0xCBF43926. Words are fed least significant byte first.
package crc_ref_pkg;

  function automatic logic [31:0] crc_bytes(input byte unsigned b [$]);
    logic [31:0] c;
    c = 32'hFFFF_FFFF;
    foreach (b[i]) begin
      c ^= 32'(b[i]);
      for (int k = 0; k < 8; k++) c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    end
    return ~c;
  endfunction

  function automatic logic [31:0] crc_words(input logic [31:0] w [$]);
    byte unsigned b [$];
    foreach (w[i]) for (int k = 0; k < 4; k++) b.push_back(w[i][8*k +: 8]);
    return crc_bytes(b);
  endfunction

endpackage
