// tb_aes_core: end-to-end test of the 8-bit AES core at its default configuration.
//
// Loads a block and a key byte by byte, starts the core, waits for completion, unloads the
// result and compares it with the reference model of aes_ref_pkg. It runs the FIPS-197
// example (plaintext 00112233..FF, key 00010203..0F, ciphertext 69C4E0D8..5A) in both
// directions, then NRAND random encrypt/decrypt pairs, one with load overlapped with unload.
// Decryption is given the round-10 key, as the core expects. Checked as well: busy_out stays
// high for exactly 164 clocks (160 round clocks + 4 drain), comp rises at the end, and each
// mechanism of the core occurred (encryption, decryption, overlapped load/unload).
`timescale 1ns/1ps
module tb_aes_core;
  import aes_ref_pkg::*;

  localparam int NRAND = 6;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       load_in = 1'b0, unload_in = 1'b0, start_in = 1'b0, inv_in = 1'b0;
  logic [7:0] key_in = '0, data_in = '0;
  logic [7:0] data_out;
  logic       busy_out, comp;

  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0, n_overlap = 0;

  aes_core dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // All stimulus changes right after a falling edge, half a clock away from the sampling edge.
  task automatic load_block(input blk_t d, input blk_t k);
    for (int n = 0; n < 16; n++) begin
      @(negedge clk);
      load_in = 1'b1; data_in = d[n]; key_in = k[n];
    end
    @(negedge clk);
    load_in = 1'b0;
  endtask

  task automatic run(input bit inv);
    int busy_clks;
    inv_in = inv; start_in = 1'b1;
    @(negedge clk);
    start_in = 1'b0;
    busy_clks = 0;
    while (busy_out) begin
      busy_clks++;
      @(negedge clk);
    end
    check(busy_clks == 164, $sformatf("busy for %0d clocks, expected 164", busy_clks));
    check(comp == 1'b1, "comp not raised at the end of the run");
    if (inv) n_dec++; else n_enc++;
  endtask

  // Unload 16 bytes; if nd/nk are given (load_next) they are loaded in the same clocks.
  task automatic unload_block(output blk_t r, input bit load_next, input blk_t nd, input blk_t nk);
    for (int n = 0; n < 16; n++) begin
      @(negedge clk);
      r[n] = data_out;
      unload_in = 1'b1;
      if (load_next) begin load_in = 1'b1; data_in = nd[n]; key_in = nk[n]; end
    end
    @(negedge clk);
    unload_in = 1'b0; load_in = 1'b0;
    if (load_next) n_overlap++;
  endtask

  function automatic string hex(input blk_t b);
    string s = "";
    for (int n = 0; n < 16; n++) s = {s, $sformatf("%02x", b[n])};
    return s;
  endfunction

  task automatic compare(input blk_t got, input blk_t exp, input string what);
    for (int n = 0; n < 16; n++)
      check(got[n] == exp[n], $sformatf("%s byte %0d: got %02x expected %02x", what, n, got[n], exp[n]));
    $display("%s: got %s expected %s", what, hex(got), hex(exp));
  endtask

  initial begin
    blk_t pt, key, ct, exp, got, last_key, dummy;
    blk_t rk [11];
    for (int n = 0; n < 16; n++) begin
      pt[n]  = 8'(8'h11 * n);
      key[n] = 8'(n);
    end
    exp = '{8'h69, 8'hC4, 8'hE0, 8'hD8, 8'h6A, 8'h7B, 8'h04, 8'h30,
            8'hD8, 8'hCD, 8'hB7, 8'h80, 8'h70, 8'hB4, 8'hC5, 8'h5A};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // FIPS-197 example, encryption: the published ciphertext is the expected value.
    load_block(pt, key);
    repeat (3) @(negedge clk);
    run(1'b0);
    unload_block(got, 1'b0, dummy, dummy);
    compare(got, exp, "FIPS-197 encrypt");
    check(ref_encrypt(pt, key) == exp, "reference model disagrees with FIPS-197");

    // Decryption of the same block, key input = round-10 key (13111D7F...).
    ref_expand(key, rk);
    last_key = rk[10];
    check(last_key[0] == 8'h13 && last_key[15] == 8'hC5, "round-10 key of the example");
    load_block(exp, last_key);
    run(1'b1);
    unload_block(got, 1'b0, dummy, dummy);
    compare(got, pt, "FIPS-197 decrypt");

    // Random blocks; the second half of each unload overlaps the next load.
    for (int t = 0; t < NRAND; t++) begin
      for (int n = 0; n < 16; n++) begin pt[n] = 8'($urandom); key[n] = 8'($urandom); end
      ct = ref_encrypt(pt, key);
      load_block(pt, key);
      run(1'b0);
      ref_expand(key, rk);
      // unload the ciphertext while loading it back with the last round key
      unload_block(got, 1'b1, ct, rk[10]);
      compare(got, ct, $sformatf("random %0d encrypt", t));
      run(1'b1);
      unload_block(got, 1'b0, dummy, dummy);
      compare(got, pt, $sformatf("random %0d decrypt", t));
      check(ref_decrypt(ct, key) == pt, "reference decrypt");
    end

    check(n_enc > 0, "no encryption ran");
    check(n_dec > 0, "no decryption ran");
    check(n_overlap > 0, "no unload overlapped with a load");
    $display("mechanisms: encrypt=%0d decrypt=%0d overlapped_load_unload=%0d", n_enc, n_dec, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
