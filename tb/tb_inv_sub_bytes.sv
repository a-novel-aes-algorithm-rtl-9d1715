// tb_inv_sub_bytes -- checks InvSubBytes on random states against the reference inverse substitution,
// plus fixed vectors worked out by hand.
module tb_inv_sub_bytes;
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

  logic [127:0] din, dout;
  inv_sub_bytes dut (.din(din), .dout(dout));

  initial begin
    din = {16{8'h63}}; #1; check(dout, '0, "all 63");
    din = 128'h637c777b_f26b6fc5_3001672b_fed7ab76; #1;
    check(dout, 128'h00010203_04050607_08090a0b_0c0d0e0f, "S(00..0f)");
    for (int i = 0; i < 500; i++) begin
      din = rand_blk(); #1;
      check(dout, r_sub(din, 1), $sformatf("random %h", din));
    end
    finish_tb();
  end
endmodule
