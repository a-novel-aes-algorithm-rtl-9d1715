// add_round_key -- AddRoundKey: the state XORed with the 128-bit round key.
//
// Used unchanged for decryption, since XOR is its own inverse; only the
// order in which round keys are applied differs. Combinational.
module add_round_key
  import aes_pkg::*;
(
  input  aes_block_t din,
  input  aes_block_t round_key,
  output aes_block_t dout
);
  assign dout = din ^ round_key;
endmodule
