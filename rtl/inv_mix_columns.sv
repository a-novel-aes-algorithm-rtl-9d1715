// inv_mix_columns -- InvMixColumns: each column times the inverse matrix.
//
// Each column a0..a3 is multiplied in GF(2^8) by the circulant matrix
//   | 0E 0B 0D 09 |
//   | 09 0E 0B 0D |
//   | 0D 09 0E 0B |
//   | 0B 0D 09 0E |   (14, 11, 13, 9 in decimal),
// which undoes mix_columns. Every product is built from xtime (shift and
// conditional XOR with 1B): with x2 = 2a, x4 = 4a, x8 = 8a,
//   9a = x8^a, 11a = x8^x2^a, 13a = x8^x4^a, 14a = x8^x4^x2.
// The four columns are processed in parallel. Combinational.
module inv_mix_columns
  import aes_pkg::*;
(
  input  aes_block_t din,
  output aes_block_t dout
);
  typedef struct packed {
    aes_byte_t m9, m11, m13, m14;
  } mults_t;

  function automatic mults_t mults(aes_byte_t a);
    aes_byte_t x2 = xtime(a);
    aes_byte_t x4 = xtime(x2);
    aes_byte_t x8 = xtime(x4);
    mults_t m;
    m.m9  = x8 ^ a;
    m.m11 = x8 ^ x2 ^ a;
    m.m13 = x8 ^ x4 ^ a;
    m.m14 = x8 ^ x4 ^ x2;
    return m;
  endfunction

  for (genvar c = 0; c < 4; c++) begin : g_col
    mults_t m0, m1, m2, m3;
    assign m0 = mults(din[127 - 32*c      -: 8]);
    assign m1 = mults(din[127 - 32*c - 8  -: 8]);
    assign m2 = mults(din[127 - 32*c - 16 -: 8]);
    assign m3 = mults(din[127 - 32*c - 24 -: 8]);
    assign dout[127 - 32*c      -: 8] = m0.m14 ^ m1.m11 ^ m2.m13 ^ m3.m9;
    assign dout[127 - 32*c - 8  -: 8] = m0.m9  ^ m1.m14 ^ m2.m11 ^ m3.m13;
    assign dout[127 - 32*c - 16 -: 8] = m0.m13 ^ m1.m9  ^ m2.m14 ^ m3.m11;
    assign dout[127 - 32*c - 24 -: 8] = m0.m11 ^ m1.m13 ^ m2.m9  ^ m3.m14;
  end
endmodule
