// sbox -- AES forward S-box, one byte in, one byte out, purely combinational.
//
// The input byte selects an entry of a 16x16 table: its upper nibble picks
// the row and its lower nibble the column. The table is the standard AES
// S-box (GF(2^8) inverse followed by the affine map); it is computed at
// elaboration in aes_pkg rather than typed in, and becomes a 256x8 ROM.
// Used 16 times in SubBytes and 4 times in the key schedule.
module sbox
  import aes_pkg::*;
(
  input  aes_byte_t a,
  output aes_byte_t b
);
  assign b = SBOX[a];
endmodule
