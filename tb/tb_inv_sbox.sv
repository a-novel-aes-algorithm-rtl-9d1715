// tb_inv_sbox -- checks all 256 inverse S-box entries: InvS(S(x)) = x with S
// from the reference model, plus the worked example 95 -> AD and 63 -> 00.
module tb_inv_sbox;
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

  logic [7:0] a, b;
  inv_sbox dut (.a(a), .b(b));

  initial begin
    for (int x = 0; x < 256; x++) begin
      a = rsbox(8'(x)); #1;
      check(128'(b), 128'(x), $sformatf("InvS(S(%02h))", x));
    end
    a = 8'h95; #1; check(128'(b), 128'had, "InvS(95)");
    a = 8'h63; #1; check(128'(b), 128'h00, "InvS(63)");
    finish_tb();
  end
endmodule
