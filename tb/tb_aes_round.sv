// tb_aes_round -- drives the round module through complete encryptions and
// decryptions, one step_a and one step_b per round, with round keys from
// the reference key expansion. After the initial AddRoundKey and after every
// round the state register is compared with the reference model's state;
// it also checks that step_a alone leaves the state register unchanged.
// Includes the standard example 3243f6a8... / 2b7e1516... -> 3925841d....
module tb_aes_round;
  import aes_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // Watchdog: give up after a fixed number of clock cycles.
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    finish_tb();
  end

  logic         reset = 1, encrypt = 1, load = 0, step_a = 0, step_b = 0, last = 0;
  logic [127:0] din = '0, round_key = '0, state;

  aes_round dut (.clk(clk), .reset(reset), .encrypt(encrypt), .load(load), .step_a(step_a),
                 .step_b(step_b), .last(last), .din(din), .round_key(round_key), .state(state));

  task automatic run_block(input logic [127:0] blk, input logic [127:0] key, input bit enc,
                           output logic [127:0] result);
    rk_t rk = r_expand(key);
    logic [127:0] s;
    @(negedge clk); encrypt = enc; din = blk; round_key = enc ? rk[0] : rk[10]; load = 1;
    @(negedge clk); load = 0;
    s = blk ^ (enc ? rk[0] : rk[10]);
    check(state, s, "initial AddRoundKey");
    for (int r = 1; r <= 10; r++) begin
      step_a = 1;
      @(negedge clk); step_a = 0;
      check(state, s, $sformatf("state held during step_a, round %0d", r));
      step_b = 1; last = (r == 10); round_key = enc ? rk[r] : rk[10 - r];
      @(negedge clk); step_b = 0; last = 0;
      if (enc) begin
        s = r_shift(r_sub(s, 0), 0);
        if (r != 10) s = r_mix(s, 0);
        s ^= rk[r];
      end else begin
        s = r_sub(r_shift(s, 1), 1) ^ rk[10 - r];
        if (r != 10) s = r_mix(s, 1);
      end
      check(state, s, $sformatf("%s round %0d", enc ? "enc" : "dec", r));
    end
    result = state;
  endtask

  initial begin
    logic [127:0] res, res2, pt, key;
    repeat (2) @(negedge clk);
    reset = 0;
    check(state, '0, "reset clears state");
    run_block(128'h3243f6a8_885a308d_313198a2_e0370734, 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c, 1, res);
    check(res, 128'h3925841d_02dc09fb_dc118597_196a0b32, "standard example ciphertext");
    run_block(res, 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c, 0, res2);
    check(res2, 128'h3243f6a8_885a308d_313198a2_e0370734, "standard example decrypted");
    for (int i = 0; i < 10; i++) begin
      pt = rand_blk(); key = rand_blk();
      run_block(pt, key, 1, res);
      check(res, r_encrypt(pt, key), "random encryption");
      run_block(res, key, 0, res2);
      check(res2, pt, "random round trip");
    end
    finish_tb();
  end
endmodule
