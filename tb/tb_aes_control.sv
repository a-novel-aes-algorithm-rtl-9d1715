// tb_aes_control -- checks the controller's cycle-by-cycle sequence:
// key expansion writes round keys 0..10 with round constants 01..36 and
// raises key_ready 11 cycles after key_load; an encryption issues load with
// key address 0, then ten step_a/step_b pairs with addresses 1..10 and last
// on the tenth, and done 21 cycles after start; a decryption started in the
// done cycle uses addresses 10, 9..0. start and key_load while busy, and
// start without a key, must be ignored; reset forgets the key.
module tb_aes_control;
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

  logic       reset = 1, key_load = 0, start = 0, encrypt = 1;
  logic       ks_load, ks_step, km_we, rd_load, rd_step_a, rd_step_b, rd_last, mode;
  logic       key_ready, ready, done;
  logic [7:0] rcon;
  logic [3:0] km_waddr, km_raddr;

  aes_control dut (.clk(clk), .reset(reset), .key_load(key_load), .start(start), .encrypt(encrypt),
                   .ks_load(ks_load), .ks_step(ks_step), .rcon(rcon), .km_we(km_we),
                   .km_waddr(km_waddr), .km_raddr(km_raddr), .rd_load(rd_load),
                   .rd_step_a(rd_step_a), .rd_step_b(rd_step_b), .rd_last(rd_last), .mode(mode),
                   .key_ready(key_ready), .ready(ready), .done(done));

  task automatic chk1(input logic got, input logic exp, input string what);
    check(128'(got), 128'(exp), what);
  endtask

  // Runs one block; start is given in the current (negedge) cycle.
  task automatic run_block(input bit enc);
    int cycles = 0;
    encrypt = enc; start = 1; #1;
    chk1(rd_load, 1, "load on start");
    check(128'(km_raddr), enc ? 128'd0 : 128'd10, "first key address");
    @(negedge clk); start = 0; cycles++;
    for (int r = 1; r <= 10; r++) begin
      // busy: requests are ignored
      start = 1; key_load = 1; #1;
      chk1(rd_load, 0, "start ignored while busy");
      chk1(ks_load, 0, "key_load ignored while busy");
      chk1(ready, 0, "not ready while busy");
      chk1(rd_step_a, 1, $sformatf("step_a round %0d", r));
      chk1(rd_step_b, 0, "no step_b in first half");
      @(negedge clk); start = 0; key_load = 0; cycles++; #1;
      chk1(rd_step_b, 1, $sformatf("step_b round %0d", r));
      chk1(rd_step_a, 0, "no step_a in second half");
      check(128'(km_raddr), enc ? 128'(r) : 128'(10 - r), $sformatf("key address round %0d", r));
      chk1(rd_last, r == 10, $sformatf("last flag round %0d", r));
      chk1(mode, enc, "mode latched");
      chk1(done, 0, "no early done");
      @(negedge clk); cycles++;
    end
    chk1(done, 1, "done");
    chk1(ready, 1, "ready in done cycle");
    check(128'(cycles), 128'd21, "start-to-done latency");
  endtask

  initial begin
    int cycles;
    logic [7:0] rc;
    repeat (2) @(negedge clk);
    reset = 0;
    chk1(key_ready, 0, "no key after reset");
    // start without a key is ignored
    start = 1; #1; chk1(rd_load, 0, "start without key ignored");
    @(negedge clk); start = 0; #1; chk1(rd_step_a, 0, "still idle");

    // key expansion
    key_load = 1; #1;
    chk1(ks_load, 1, "ks_load");
    chk1(km_we, 1, "write round key 0");
    check(128'(km_waddr), 0, "address 0");
    @(negedge clk); key_load = 0; cycles = 1;
    rc = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      chk1(km_we, 1, "key write");
      chk1(ks_step, 1, "ks_step");
      check(128'(km_waddr), 128'(r), $sformatf("key address %0d", r));
      check(128'(rcon), 128'(rc), $sformatf("rcon %0d", r));
      chk1(key_ready, 0, "key not ready yet");
      rc = rmul(rc, 8'h02);
      @(negedge clk); cycles++;
    end
    chk1(key_ready, 1, "key_ready");
    chk1(km_we, 0, "no more writes");
    check(128'(cycles), 128'd11, "key expansion cycles");

    run_block(1);
    run_block(0);   // back to back, started in the done cycle
    @(negedge clk);
    chk1(done, 0, "done is one cycle");
    run_block(1);
    @(negedge clk);

    reset = 1; @(negedge clk); reset = 0;
    chk1(key_ready, 0, "reset forgets the key");
    finish_tb();
  end
endmodule
