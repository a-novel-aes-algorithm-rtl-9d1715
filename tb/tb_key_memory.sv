// tb_key_memory -- writes all 11 round-key slots, reads them back through
// the asynchronous read port, checks that a cycle with we = 0 writes nothing
// and that overwriting one slot leaves the others alone.
module tb_key_memory;
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

  logic         we = 0;
  logic [3:0]   waddr = '0, raddr = '0;
  logic [127:0] wdata = '0, rdata;
  logic [127:0] model [11];

  key_memory dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                  .raddr(raddr), .rdata(rdata));

  task automatic write(input int a, input logic [127:0] d);
    @(negedge clk); we = 1; waddr = 4'(a); wdata = d;
    @(negedge clk); we = 0;
    model[a] = d;
  endtask

  task automatic read_all(input string what);
    for (int a = 0; a < 11; a++) begin
      raddr = 4'(a); #1;
      check(rdata, model[a], $sformatf("%s addr %0d", what, a));
    end
  endtask

  initial begin
    for (int a = 0; a < 11; a++) write(a, rand_blk());
    read_all("fill");
    // we low: data on the write port must not land.
    @(negedge clk); waddr = 4'd3; wdata = ~model[3];
    @(negedge clk);
    read_all("we low");
    for (int i = 0; i < 50; i++) begin
      write($urandom_range(0, 10), rand_blk());
      read_all("overwrite");
    end
    finish_tb();
  end
endmodule
