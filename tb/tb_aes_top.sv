// tb_aes_top -- end-to-end test of the AES-128 core at its default size.
//
// Known answers: the all-ones key with plaintext 27dabd46... must give
// b2548192..., and the two standard AES-128 examples (000102.. /
// 00112233.. -> 69c4e0d8..., 2b7e1516.. / 3243f6a8.. -> 3925841d...) must
// encrypt and decrypt. Then random keys and blocks are compared with the
// behavioural reference model in both directions. The test counts every
// mechanism of the core and fails if one never happened: key expansion,
// encryption, decryption, a switch of direction between consecutive blocks,
// a block started in the done cycle of the previous one, several blocks on
// one expanded key, a start ignored while busy. It also checks the
// latencies: key_ready 11 cycles after key_load, done 21 cycles after start.
module tb_aes_top;
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

  logic         reset = 1, encrypt = 1, key_load = 0, start = 0;
  logic [127:0] user_key = '0, text_in = '0, text_out;
  logic         key_ready, ready, done;

  aes_top dut (.clk(clk), .reset(reset), .encrypt(encrypt), .key_load(key_load), .start(start),
               .user_key(user_key), .text_in(text_in), .text_out(text_out),
               .key_ready(key_ready), .ready(ready), .done(done));

  int n_keyexp = 0, n_enc = 0, n_dec = 0, n_switch = 0, n_b2b = 0, n_reuse = 0, n_ignored = 0;
  int blocks_on_key = 0;
  bit have_last = 0, last_mode = 0;

  task automatic load_key(input logic [127:0] k);
    int cycles = 0;
    @(negedge clk); user_key = k; key_load = 1;
    @(negedge clk); key_load = 0; user_key = ~k; cycles = 1;
    while (!key_ready) begin
      @(negedge clk); cycles++;
      if (cycles > 100) break;
    end
    check(128'(cycles), 128'd11, "key expansion latency");
    n_keyexp++;
    blocks_on_key = 0;
  endtask

  // Issues one block in the current cycle (caller is at a negedge with
  // ready high), waits for done and returns the result.
  task automatic run_block(input logic [127:0] blk, input bit enc, input bit poke_busy,
                           output logic [127:0] result);
    int cycles = 0;
    if (!ready) begin
      failures++; checks++;
      $display("FAIL core not ready");
    end
    if (done) n_b2b++;
    encrypt = enc; text_in = blk; start = 1;
    @(negedge clk); start = 0; text_in = ~blk; encrypt = !enc; cycles = 1;
    while (!done) begin
      if (poke_busy && cycles == 5) begin
        // a start while busy must be ignored
        start = 1; text_in = rand_blk();
        @(negedge clk); start = 0; cycles++;
        n_ignored++;
        continue;
      end
      @(negedge clk); cycles++;
      if (cycles > 100) break;
    end
    check(128'(cycles), 128'd21, "start-to-done latency");
    result = text_out;
    if (enc) n_enc++; else n_dec++;
    if (have_last && last_mode != enc) n_switch++;
    have_last = 1; last_mode = enc;
    blocks_on_key++;
    if (blocks_on_key == 2) n_reuse++;
  endtask

  task automatic known(input logic [127:0] k, input logic [127:0] pt, input logic [127:0] ct,
                       input string what);
    logic [127:0] r;
    load_key(k);
    run_block(pt, 1, 0, r);
    check(r, ct, {what, " encrypt"});
    @(negedge clk);
    run_block(ct, 0, 0, r);
    check(r, pt, {what, " decrypt"});
  endtask

  initial begin
    logic [127:0] k, pt, ct, r;
    repeat (3) @(negedge clk);
    reset = 0;

    known({16{8'hff}}, 128'h27dabd46_f9da52d7_9967b7a0_b33a492e,
          128'hb2548192_1106069a_0ee0be38_11ab5ad5, "all-ones key");
    known(128'h00010203_04050607_08090a0b_0c0d0e0f, 128'h00112233_44556677_8899aabb_ccddeeff,
          128'h69c4e0d8_6a7b0430_d8cdb780_70b4c55a, "standard example 1");
    known(128'h2b7e1516_28aed2a6_abf71588_09cf4f3c, 128'h3243f6a8_885a308d_313198a2_e0370734,
          128'h3925841d_02dc09fb_dc118597_196a0b32, "standard example 2");

    // Random keys; on each, a burst of back-to-back blocks in both
    // directions, compared with the reference model.
    for (int i = 0; i < 6; i++) begin
      k = rand_blk();
      load_key(k);
      for (int j = 0; j < 6; j++) begin
        bit enc;
        enc = 1'($urandom);
        pt = rand_blk();
        run_block(pt, enc, j == 2, r);
        check(r, enc ? r_encrypt(pt, k) : r_decrypt(pt, k),
              $sformatf("random %s key %0d block %0d", enc ? "encrypt" : "decrypt", i, j));
        if (enc) check(r_decrypt(r, k), pt, "reference round trip");
      end
    end

    // text_out holds the result after done
    repeat (5) @(negedge clk);
    check(text_out, r, "result held");

    $display("mechanisms: key_expansion=%0d encrypt=%0d decrypt=%0d mode_switch=%0d back_to_back=%0d key_reuse=%0d ignored_start=%0d",
             n_keyexp, n_enc, n_dec, n_switch, n_b2b, n_reuse, n_ignored);
    checks++; if (n_keyexp == 0) begin failures++; $display("FAIL no key expansion"); end
    checks++; if (n_enc == 0)    begin failures++; $display("FAIL no encryption"); end
    checks++; if (n_dec == 0)    begin failures++; $display("FAIL no decryption"); end
    checks++; if (n_switch == 0) begin failures++; $display("FAIL no mode switch"); end
    checks++; if (n_b2b == 0)    begin failures++; $display("FAIL no back-to-back block"); end
    checks++; if (n_reuse == 0)  begin failures++; $display("FAIL no key reuse"); end
    checks++; if (n_ignored == 0) begin failures++; $display("FAIL no ignored start"); end
    finish_tb();
  end
endmodule
