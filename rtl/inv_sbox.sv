// inv_sbox -- AES inverse S-box, one byte in, one byte out, combinational.
//
// Row = upper nibble, column = lower nibble of the input byte; for example
// 95 maps to AD. The table is the inverse permutation of the forward S-box,
// computed at elaboration in aes_pkg, and becomes a 256x8 ROM. Used 16 times
// in InvSubBytes on the decryption path.
module inv_sbox
  import aes_pkg::*;
(
  input  aes_byte_t a,
  output aes_byte_t b
);
  assign b = INV_SBOX[a];
endmodule
