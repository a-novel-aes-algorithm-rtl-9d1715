// sub_bytes -- SubBytes: every byte of the 128-bit state through its own S-box.
//
// Sixteen S-box instances work in parallel, so the whole state is
// substituted in one combinational pass. Byte k of the output is
// S(byte k of the input); byte 0 is bits 127:120.
module sub_bytes
  import aes_pkg::*;
(
  input  aes_block_t din,
  output aes_block_t dout
);
  for (genvar k = 0; k < 16; k++) begin : g_byte
    sbox u_sbox (.a(din[127-8*k -: 8]), .b(dout[127-8*k -: 8]));
  end
endmodule
