// tb_aes_core_modes: end-to-end test of the encryption-only and decryption-only configurations.
//
// Core 0 is aes_core with MODE_ENC, core 1 with MODE_DEC; each has its own set of inputs. The
// FIPS-197 example and NRAND random blocks are encrypted by core 0 and the ciphertext is then
// decrypted by core 1 (given the round-10 key). inv_in is driven to both values on each core to
// show it is ignored. busy_out must stay high for 164 clocks and comp must rise at the end.
`timescale 1ns/1ps
module tb_aes_core_modes;
  import aes_ref_pkg::*;
  import aes_pkg::*;

  localparam int NRAND = 4;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       load_in [2], unload_in [2], start_in [2], inv_in [2];
  logic [7:0] key_in [2], data_in [2], data_out [2];
  logic       busy_out [2], comp [2];

  int checks = 0, failures = 0;

  aes_core #(.MODE(MODE_ENC)) dut_enc (
    .clk, .rst_n, .load_in(load_in[0]), .unload_in(unload_in[0]), .start_in(start_in[0]),
    .inv_in(inv_in[0]), .key_in(key_in[0]), .data_in(data_in[0]), .data_out(data_out[0]),
    .busy_out(busy_out[0]), .comp(comp[0])
  );

  aes_core #(.MODE(MODE_DEC)) dut_dec (
    .clk, .rst_n, .load_in(load_in[1]), .unload_in(unload_in[1]), .start_in(start_in[1]),
    .inv_in(inv_in[1]), .key_in(key_in[1]), .data_in(data_in[1]), .data_out(data_out[1]),
    .busy_out(busy_out[1]), .comp(comp[1])
  );

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

  // Stimulus changes right after a falling edge; c selects the core.
  task automatic load_block(input int c, input blk_t d, input blk_t k);
    for (int n = 0; n < 16; n++) begin
      @(negedge clk);
      load_in[c] = 1'b1; data_in[c] = d[n]; key_in[c] = k[n];
    end
    @(negedge clk);
    load_in[c] = 1'b0;
  endtask

  task automatic run(input int c, input bit inv);
    int busy_clks;
    inv_in[c] = inv; start_in[c] = 1'b1;
    @(negedge clk);
    start_in[c] = 1'b0;
    busy_clks = 0;
    while (busy_out[c]) begin
      busy_clks++;
      @(negedge clk);
    end
    check(busy_clks == 164, $sformatf("core %0d busy for %0d clocks, expected 164", c, busy_clks));
    check(comp[c] == 1'b1, $sformatf("core %0d: comp not raised", c));
  endtask

  task automatic unload_block(input int c, output blk_t r);
    for (int n = 0; n < 16; n++) begin
      @(negedge clk);
      r[n] = data_out[c];
      unload_in[c] = 1'b1;
    end
    @(negedge clk);
    unload_in[c] = 1'b0;
  endtask

  task automatic compare(input blk_t got, input blk_t exp, input string what);
    for (int n = 0; n < 16; n++)
      check(got[n] == exp[n], $sformatf("%s byte %0d: got %02x expected %02x", what, n, got[n], exp[n]));
  endtask

  initial begin
    blk_t pt, key, ct, got;
    blk_t rk [11];
    for (int c = 0; c < 2; c++) begin
      load_in[c] = 1'b0; unload_in[c] = 1'b0; start_in[c] = 1'b0; inv_in[c] = 1'b0;
      key_in[c] = '0; data_in[c] = '0;
    end
    for (int n = 0; n < 16; n++) begin
      pt[n]  = 8'(8'h11 * n);
      key[n] = 8'(n);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int t = 0; t <= NRAND; t++) begin
      if (t > 0)
        for (int n = 0; n < 16; n++) begin pt[n] = 8'($urandom); key[n] = 8'($urandom); end
      ct = ref_encrypt(pt, key);
      ref_expand(key, rk);
      // encryption-only core; inv_in alternates and must make no difference
      load_block(0, pt, key);
      run(0, t[0]);
      unload_block(0, got);
      compare(got, ct, $sformatf("block %0d, encryption-only core", t));
      // decryption-only core, round-10 key as key input
      load_block(1, ct, rk[10]);
      run(1, !t[0]);
      unload_block(1, got);
      compare(got, pt, $sformatf("block %0d, decryption-only core", t));
    end
    check(ct != pt, "sanity: ciphertext differs from plaintext");
    $display("blocks through each single-direction core: %0d", NRAND + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
