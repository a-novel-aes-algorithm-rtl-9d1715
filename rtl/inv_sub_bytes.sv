// inv_sub_bytes -- InvSubBytes: every state byte through its own inverse S-box.
//
// Sixteen inverse S-box instances in parallel, one combinational pass.
// Byte k of the output is InvS(byte k of the input); byte 0 is bits 127:120.
module inv_sub_bytes
  import aes_pkg::*;
(
  input  aes_block_t din,
  output aes_block_t dout
);
  for (genvar k = 0; k < 16; k++) begin : g_byte
    inv_sbox u_inv_sbox (.a(din[127-8*k -: 8]), .b(dout[127-8*k -: 8]));
  end
endmodule
