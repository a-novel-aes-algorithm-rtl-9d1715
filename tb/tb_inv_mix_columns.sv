// tb_inv_mix_columns -- checks InvMixColumns on random states against a general GF(2^8) matrix product,
// plus fixed vectors worked out by hand.
module tb_inv_mix_columns;
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
  inv_mix_columns dut (.din(din), .dout(dout));

  initial begin
    din = 128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6; #1;
    check(dout, 128'hdb135345_f20a225c_01010101_c6c6c6c6, "known columns");
    for (int i = 0; i < 500; i++) begin
      din = rand_blk(); #1;
      check(dout, r_mix(din, 1), $sformatf("random %h", din));
    end
    finish_tb();
  end
endmodule
