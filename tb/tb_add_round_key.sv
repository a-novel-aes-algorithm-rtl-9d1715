// tb_add_round_key -- checks AddRoundKey as a bitwise XOR on fixed and
// random state/key pairs, and that applying the same key twice restores the
// state.
module tb_add_round_key;
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    finish_tb();
  end

  logic [127:0] din, key, dout;
  add_round_key dut (.din(din), .round_key(key), .dout(dout));

  initial begin
    din = 128'h3243f6a8_885a308d_313198a2_e0370734;
    key = 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c; #1;
    check(dout, 128'h193de3be_a0f4e22b_9ac68d2a_e9f84808, "round 0 of the standard example");
    for (int i = 0; i < 500; i++) begin
      logic [127:0] s;
      s = rand_blk(); din = s; key = rand_blk(); #1;
      for (int k = 0; k < 128; k++)
        if (dout[k] != (s[k] != key[k])) begin
          failures++;
          $display("FAIL bit %0d", k);
          break;
        end
      checks++;
      din = dout; #1;
      check(dout, s, "key applied twice");
    end
    finish_tb();
  end
endmodule
