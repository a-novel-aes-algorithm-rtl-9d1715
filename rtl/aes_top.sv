// aes_top -- AES-128 encryption and decryption core built around one
// iterated round module.
//
// Three parts, as the design is organised:
//   * key_schedule + key_memory: on key_load the 128-bit user_key is
//     expanded, one round key per cycle, and the 11 round keys (44 words)
//     are kept in key memory. key_ready rises NR+1 = 11 cycles after
//     key_load and stays high until the next key_load or reset.
//   * aes_round: the round datapath with its state register and a pipeline
//     register in the middle of the round, for both directions.
//   * aes_control: round counter 1..10, round constants, key-memory
//     addresses and the step signals.
//
// Use: after key_ready, pulse start with text_in and encrypt stable in that
// cycle (encrypt = 1: text_in is plaintext, text_out ciphertext; encrypt = 0:
// the reverse). done pulses 2*NR + 1 = 21 cycles later, and text_out holds
// the result from then until the next block finishes its initial
// AddRoundKey. start is accepted whenever ready is high, including the
// done cycle, so one block can be issued every 21 cycles. Any number of
// blocks can be processed with one expanded key. reset is synchronous and
// active high.
//
// The three-part organisation and the encrypt control bit follow the
// published description; the port names text_in/text_out (one pair for
// both directions) and the handshake are choices of this implementation.
module aes_top
  import aes_pkg::*;
#(
  parameter int unsigned NR_P = aes_pkg::NR,
  localparam int unsigned AW  = $clog2(NR_P + 1)
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       encrypt,
  input  logic       key_load,
  input  logic       start,
  input  aes_block_t user_key,
  input  aes_block_t text_in,
  output aes_block_t text_out,
  output logic       key_ready,
  output logic       ready,
  output logic       done
);
  logic          ks_load, ks_step, km_we;
  logic          rd_load, rd_step_a, rd_step_b, rd_last, mode;
  logic [AW-1:0] km_waddr, km_raddr;
  aes_byte_t     rcon;
  aes_block_t    next_key, km_wdata, round_key;

  aes_control #(.NR_P(NR_P)) u_control (
    .clk, .reset, .key_load, .start, .encrypt,
    .ks_load, .ks_step, .rcon, .km_we, .km_waddr, .km_raddr,
    .rd_load, .rd_step_a, .rd_step_b, .rd_last, .mode,
    .key_ready, .ready, .done
  );

  key_schedule u_key_schedule (
    .clk, .load(ks_load), .step(ks_step), .user_key, .rcon,
    .key(), .next_key
  );

  // Round key 0 is the user key itself; the others come from the schedule.
  assign km_wdata = ks_load ? user_key : next_key;

  key_memory #(.NR_P(NR_P)) u_key_memory (
    .clk, .we(km_we), .waddr(km_waddr), .wdata(km_wdata),
    .raddr(km_raddr), .rdata(round_key)
  );

  aes_round u_round (
    .clk, .reset, .encrypt(mode), .load(rd_load), .step_a(rd_step_a),
    .step_b(rd_step_b), .last(rd_last), .din(text_in), .round_key,
    .state(text_out)
  );
endmodule
