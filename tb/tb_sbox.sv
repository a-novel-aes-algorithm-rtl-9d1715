// tb_sbox -- checks all 256 S-box entries against a table built by
// exhaustive GF(2^8) inverse search and the bitwise affine map, plus a few
// well-known entries (00->63, 01->7C, 53->ED, FF->16).
module tb_sbox;
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
  sbox dut (.a(a), .b(b));

  initial begin
    for (int x = 0; x < 256; x++) begin
      a = 8'(x); #1;
      check(128'(b), 128'(rsbox(8'(x))), $sformatf("S(%02h)", x));
    end
    a = 8'h00; #1; check(128'(b), 128'h63, "S(00)");
    a = 8'h01; #1; check(128'(b), 128'h7c, "S(01)");
    a = 8'h53; #1; check(128'(b), 128'hed, "S(53)");
    a = 8'hff; #1; check(128'(b), 128'h16, "S(ff)");
    finish_tb();
  end
endmodule
