// aes_control -- sequencer of the AES-128 core: key expansion, round
// counting, round constants, key-memory addressing and the round steps.
//
// A round register counts the rounds 1 to NR and a round-constant register
// steps through 01, 02, 04, ..., 80, 1B, 36 (each the xtime of the last).
//
// Key expansion (key_load accepted while ready or idle without a key):
//   key_load cycle : ks_load, and round key 0 (= user_key) is written to
//                    key memory address 0
//   S_KEYEXP, round r = 1..NR : the key schedule's next key (made with
//                    rcon) is written to address r and becomes the current
//                    key; after r = NR, key_ready goes high.
//   That is NR+1 cycles from key_load to key_ready.
//
// One block (start accepted while ready = key_ready and not busy):
//   start cycle    : rd_load with key address 0 (encrypt) or NR (decrypt),
//                    the direction is latched into mode
//   S_RND_A        : rd_step_a
//   S_RND_B        : rd_step_b with key address r (encrypt) or NR - r
//                    (decrypt), rd_last when r = NR; r counts up
//   S_DONE         : done is high for one cycle, the result is in the round
//                    module's state register; a new start or key_load may be
//                    given in this same cycle.
//   done follows the start cycle by 2*NR + 1 clock edges, so blocks can be
//   issued every 2*NR + 1 cycles. start or key_load while busy is ignored.
//
// reset is synchronous, active high, and also forgets the key.
//
// The round counter 1..10 and the ordered round constants follow the
// published description; the state machine, the handshake (key_load,
// start, ready, done) and expanding the key once per key_load are choices
// of this implementation.
module aes_control
  import aes_pkg::*;
#(
  parameter int unsigned NR_P = aes_pkg::NR,
  localparam int unsigned AW  = $clog2(NR_P + 1)
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          key_load,
  input  logic          start,
  input  logic          encrypt,
  // key schedule and key memory
  output logic          ks_load,
  output logic          ks_step,
  output aes_byte_t     rcon,
  output logic          km_we,
  output logic [AW-1:0] km_waddr,
  output logic [AW-1:0] km_raddr,
  // round module
  output logic          rd_load,
  output logic          rd_step_a,
  output logic          rd_step_b,
  output logic          rd_last,
  output logic          mode,
  // status
  output logic          key_ready,
  output logic          ready,
  output logic          done
);
  typedef enum logic [2:0] {S_IDLE, S_KEYEXP, S_RND_A, S_RND_B, S_DONE} ctrl_state_t;

  ctrl_state_t   st_q, st_d;
  logic [AW-1:0] round_q, round_d;
  aes_byte_t     rcon_q, rcon_d;
  logic          mode_q, mode_d;
  logic          kv_q, kv_d;
  logic          idle;

  assign idle      = (st_q == S_IDLE) || (st_q == S_DONE);
  assign key_ready = kv_q;
  assign ready     = idle && kv_q;
  assign done      = (st_q == S_DONE);
  assign rcon      = rcon_q;
  assign mode      = mode_q;

  always_comb begin
    st_d      = st_q;
    round_d   = round_q;
    rcon_d    = rcon_q;
    mode_d    = mode_q;
    kv_d      = kv_q;
    ks_load   = 1'b0;
    ks_step   = 1'b0;
    km_we     = 1'b0;
    km_waddr  = '0;
    km_raddr  = '0;
    rd_load   = 1'b0;
    rd_step_a = 1'b0;
    rd_step_b = 1'b0;
    rd_last   = 1'b0;

    unique case (st_q)
      S_IDLE, S_DONE: begin
        st_d = S_IDLE;
        if (key_load) begin
          ks_load  = 1'b1;
          km_we    = 1'b1;
          km_waddr = '0;
          kv_d     = 1'b0;
          round_d  = AW'(1);
          rcon_d   = 8'h01;
          st_d     = S_KEYEXP;
        end else if (start && kv_q) begin
          rd_load  = 1'b1;
          km_raddr = encrypt ? '0 : AW'(NR_P);
          mode_d   = encrypt;
          round_d  = AW'(1);
          st_d     = S_RND_A;
        end
      end
      S_KEYEXP: begin
        km_we    = 1'b1;
        km_waddr = round_q;
        ks_step  = 1'b1;
        rcon_d   = xtime(rcon_q);
        round_d  = round_q + AW'(1);
        if (round_q == AW'(NR_P)) begin
          kv_d = 1'b1;
          st_d = S_IDLE;
        end
      end
      S_RND_A: begin
        rd_step_a = 1'b1;
        st_d      = S_RND_B;
      end
      S_RND_B: begin
        rd_step_b = 1'b1;
        km_raddr  = mode_q ? round_q : AW'(NR_P) - round_q;
        rd_last   = (round_q == AW'(NR_P));
        round_d   = round_q + AW'(1);
        st_d      = rd_last ? S_DONE : S_RND_A;
      end
      default: st_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      st_q    <= S_IDLE;
      round_q <= '0;
      rcon_q  <= 8'h01;
      mode_q  <= 1'b1;
      kv_q    <= 1'b0;
    end else begin
      st_q    <= st_d;
      round_q <= round_d;
      rcon_q  <= rcon_d;
      mode_q  <= mode_d;
      kv_q    <= kv_d;
    end
  end

  // The round counter stays within 1..NR while a block or a key is in work.
  a_round_range: assert property (@(posedge clk) disable iff (reset)
    (st_q inside {S_KEYEXP, S_RND_A, S_RND_B}) |-> (round_q >= AW'(1) && round_q <= AW'(NR_P)));
  // A block never starts without a complete set of round keys.
  a_load_needs_key: assert property (@(posedge clk) disable iff (reset)
    rd_load |-> kv_q);
endmodule
