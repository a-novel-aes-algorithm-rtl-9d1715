// aes_round -- the round module: one AES round per two clock cycles, either
// direction, reused for all ten rounds.
//
// Two register arrays split a round. The state register (state_q) holds the
// block between rounds; the pipeline register (mid_q) sits halfway through
// the round, so the critical path is only half a round long:
//
//   encrypt:  state_q -> SubBytes -> ShiftRows -> mid_q
//             mid_q -> MixColumns (skipped when last) -> AddRoundKey -> state_q
//   decrypt:  state_q -> InvShiftRows -> InvSubBytes -> mid_q
//             mid_q -> AddRoundKey -> InvMixColumns (skipped when last) -> state_q
//
// The decrypt order is the straightforward inverse cipher: round keys are
// applied from the last one back to the first, and InvMixColumns follows
// AddRoundKey.
//
// Controls (from aes_control), each acting at the next rising clock edge:
//   load    state_q <= din ^ round_key (the initial AddRoundKey)
//   step_a  mid_q   <= first half of the round applied to state_q
//   step_b  state_q <= second half of the round applied to mid_q, using
//           round_key; with last = 1 the (Inv)MixColumns step is left out
// encrypt selects the direction; it must stay stable through a block.
// A round therefore takes one step_a cycle and one step_b cycle. reset is
// synchronous and active high and clears both registers.
//
// The four round steps, their inverses and register arrays between them
// follow the published description of this core; placing exactly one
// pipeline register after (Inv)ShiftRows/(Inv)SubBytes, and reusing one
// round for all ten rounds, are choices of this implementation.
module aes_round
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       encrypt,
  input  logic       load,
  input  logic       step_a,
  input  logic       step_b,
  input  logic       last,
  input  aes_block_t din,
  input  aes_block_t round_key,
  output aes_block_t state
);
  aes_block_t state_q, mid_q;

  // Initial AddRoundKey.
  aes_block_t init_d;
  add_round_key u_ark_init (.din(din), .round_key(round_key), .dout(init_d));

  // First half of the round.
  aes_block_t sb_o, sr_o, isr_o, isb_o, half_a;
  sub_bytes      u_sb  (.din(state_q), .dout(sb_o));
  shift_rows     u_sr  (.din(sb_o),    .dout(sr_o));
  inv_shift_rows u_isr (.din(state_q), .dout(isr_o));
  inv_sub_bytes  u_isb (.din(isr_o),   .dout(isb_o));
  assign half_a = encrypt ? sr_o : isb_o;

  // Second half of the round.
  aes_block_t mc_o, enc_ark_i, enc_o, dec_ark_o, imc_o, dec_o, half_b;
  mix_columns     u_mc      (.din(mid_q), .dout(mc_o));
  assign enc_ark_i = last ? mid_q : mc_o;
  add_round_key   u_ark_enc (.din(enc_ark_i), .round_key(round_key), .dout(enc_o));
  add_round_key   u_ark_dec (.din(mid_q),     .round_key(round_key), .dout(dec_ark_o));
  inv_mix_columns u_imc     (.din(dec_ark_o), .dout(imc_o));
  assign dec_o  = last ? dec_ark_o : imc_o;
  assign half_b = encrypt ? enc_o : dec_o;

  always_ff @(posedge clk) begin
    if (reset) begin
      state_q <= '0;
      mid_q   <= '0;
    end else begin
      if (load)        state_q <= init_d;
      else if (step_b) state_q <= half_b;
      if (step_a)      mid_q   <= half_a;
    end
  end

  assign state = state_q;
endmodule
