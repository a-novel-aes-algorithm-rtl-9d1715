// key_schedule -- AES-128 key expansion, one round key per clock cycle.
//
// The current round key sits in a 128-bit register, split into four words:
// key_word(0) = bits 127:96, key_word(1) = 95:64, key_word(2) = 63:32,
// key_word(3) = 31:0. The next round key is formed combinationally:
//   t        = SubWord(RotWord(key_word(3))) ^ {rcon, 24'h0}
//   next(0)  = key_word(0) ^ t
//   next(i)  = key_word(i) ^ next(i-1),  i = 1..3
// RotWord is a one-byte left rotation of the word, SubWord passes its four
// bytes through four S-box instances, and rcon (01, 02, 04, ... 1B, 36) is
// supplied by the controller.
//
// load copies user_key into the register; step replaces the register with
// next_key. Both act at the rising clock edge; load wins. next_key is valid
// in the same cycle as key and rcon. The register has no reset: it is
// always loaded before it is used.
//
// The key-word split and the parts (byte substitution, byte shift, round
// constant, XOR, own S-boxes) follow the published description; producing
// one round key per cycle is a choice of this implementation.
module key_schedule
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       load,
  input  logic       step,
  input  aes_block_t user_key,
  input  aes_byte_t  rcon,
  output aes_block_t key,
  output aes_block_t next_key
);
  aes_block_t key_q;
  aes_word_t  key_word [NK];
  aes_word_t  rot, sub, t;
  aes_word_t  nw [NK];

  for (genvar i = 0; i < NK; i++) begin : g_word
    assign key_word[i] = key_q[127 - 32*i -: 32];
  end

  assign rot = {key_word[3][23:0], key_word[3][31:24]};
  for (genvar i = 0; i < 4; i++) begin : g_sub
    sbox u_sbox (.a(rot[31 - 8*i -: 8]), .b(sub[31 - 8*i -: 8]));
  end
  assign t = sub ^ {rcon, 24'h000000};

  assign nw[0] = key_word[0] ^ t;
  for (genvar i = 1; i < NK; i++) begin : g_chain
    assign nw[i] = key_word[i] ^ nw[i-1];
  end
  assign next_key = {nw[0], nw[1], nw[2], nw[3]};

  always_ff @(posedge clk) begin
    if (load)      key_q <= user_key;
    else if (step) key_q <= next_key;
  end

  assign key = key_q;
endmodule
