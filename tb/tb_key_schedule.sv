// tb_key_schedule -- loads cipher keys and steps the key schedule ten times
// with the round constants 01..36, comparing every round key (and the
// combinational next_key) with the reference key expansion. Includes the
// standard AES-128 example key 2b7e1516..., whose round keys 1 and 10 are
// a0fafe17... and d014f9a8..., and the all-ones key.
module tb_key_schedule;
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    finish_tb();
  end

  logic         load = 0, step = 0;
  logic [127:0] user_key = '0, key, next_key;
  logic [7:0]   rcon = 8'h01;

  key_schedule dut (.clk(clk), .load(load), .step(step), .user_key(user_key),
                    .rcon(rcon), .key(key), .next_key(next_key));

  task automatic run_key(input logic [127:0] k);
    rk_t rk = r_expand(k);
    logic [7:0] rc = 8'h01;
    @(negedge clk); user_key = k; load = 1;
    @(negedge clk); load = 0;
    check(key, rk[0], "round key 0");
    for (int r = 1; r <= 10; r++) begin
      rcon = rc; #1;
      check(next_key, rk[r], $sformatf("next_key %0d", r));
      step = 1;
      @(negedge clk); step = 0;
      check(key, rk[r], $sformatf("round key %0d", r));
      rc = rmul(rc, 8'h02);
    end
    // Holding: no step, no load, the key stays.
    @(negedge clk); check(key, rk[10], "hold");
  endtask

  initial begin
    rk_t rk;
    run_key(128'h2b7e1516_28aed2a6_abf71588_09cf4f3c);
    rk = r_expand(128'h2b7e1516_28aed2a6_abf71588_09cf4f3c);
    check(rk[1],  128'ha0fafe17_88542cb1_23a33939_2a6c7605, "reference round key 1");
    check(rk[10], 128'hd014f9a8_c9ee2589_e13f0cc8_b6630ca6, "reference round key 10");
    run_key({16{8'hff}});
    check(key, 128'hd60a3588_e472f07b_82d2d785_8cd7c326, "all-ones key, round key 10");
    for (int i = 0; i < 20; i++) run_key(rand_blk());
    // load wins over step
    @(negedge clk); user_key = 128'h1; load = 1; step = 1;
    @(negedge clk); load = 0; step = 0;
    check(key, 128'h1, "load has priority over step");
    finish_tb();
  end
endmodule
