// mix_columns -- MixColumns: each state column multiplied by a fixed matrix.
//
// Each 4-byte column a0..a3 is replaced by
//   r0 = 2a0 ^ 3a1 ^  a2 ^  a3      r1 =  a0 ^ 2a1 ^ 3a2 ^  a3
//   r2 =  a0 ^  a1 ^ 2a2 ^ 3a3      r3 = 3a0 ^  a1 ^  a2 ^ 2a3
// in GF(2^8), where addition is XOR and multiplication by 2 is a shift with
// a conditional XOR of 1B (xtime); 3a = 2a ^ a. The four columns are
// processed independently and in parallel. Combinational.
//
// The published description gives only the inverse matrix; this forward
// matrix is the standard AES one that it inverts.
module mix_columns
  import aes_pkg::*;
(
  input  aes_block_t din,
  output aes_block_t dout
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    aes_byte_t a0, a1, a2, a3;
    assign a0 = din[127 - 32*c      -: 8];
    assign a1 = din[127 - 32*c - 8  -: 8];
    assign a2 = din[127 - 32*c - 16 -: 8];
    assign a3 = din[127 - 32*c - 24 -: 8];
    assign dout[127 - 32*c      -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
    assign dout[127 - 32*c - 8  -: 8] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
    assign dout[127 - 32*c - 16 -: 8] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
    assign dout[127 - 32*c - 24 -: 8] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
  end
endmodule
