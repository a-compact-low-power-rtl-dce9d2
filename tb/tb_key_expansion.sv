// tb_key_expansion: runs the byte-serial key schedule through all 10 rounds in both directions
// and compares with the reference key expansion.
//   forward : key loaded, then in step n of round r (r = 0..9) new_byte must be byte n of round
//             key r+1, and rk_byte four clocks later the same byte;
//   backward: round-10 key loaded, new_byte in round r must be byte n of round key 9-r.
// Four drain clocks follow each run, as in the core; the key must stay intact through them.
`timescale 1ns/1ps
module tb_key_expansion;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, load = 1'b0, run = 1'b0, drain = 1'b0, inv = 1'b0;
  logic [3:0] rnd = '0, step = '0;
  byte_t      key_in = '0, new_byte, rk_byte;
  int checks = 0, failures = 0;

  key_expansion dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic trial(input blk_t key, input bit i);
    blk_t rk [11];
    blk_t ld;
    int   kr_of_round;
    ref_expand(key, rk);
    ld = i ? rk[10] : rk[0];
    inv = i;
    for (int n = 0; n < 16; n++) begin
      @(negedge clk);
      load = 1'b1; key_in = ld[n];
    end
    @(negedge clk);
    load = 1'b0;
    for (int c = 0; c < 164; c++) begin
      run = (c < 160); drain = (c >= 160);
      rnd = 4'(c / 16); step = 4'(c % 16);
      #1;
      if (c < 160) begin
        kr_of_round = i ? 9 - c / 16 : c / 16 + 1;
        check(new_byte == rk[kr_of_round][c % 16],
              $sformatf("inv=%0d round %0d byte %0d: %02x expected %02x", i, c / 16, c % 16,
                        new_byte, rk[kr_of_round][c % 16]));
      end
      if (c >= 4) begin
        kr_of_round = i ? 9 - (c - 4) / 16 : (c - 4) / 16 + 1;
        check(rk_byte == rk[kr_of_round][(c - 4) % 16],
              $sformatf("inv=%0d rk_byte at clock %0d: %02x expected %02x", i, c, rk_byte,
                        rk[kr_of_round][(c - 4) % 16]));
      end
      @(negedge clk);
    end
    run = 1'b0; drain = 1'b0;
  endtask

  initial begin
    blk_t key;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 16; n++) key[n] = 8'(n);
    trial(key, 1'b0);
    trial(key, 1'b1);
    for (int t = 0; t < 4; t++) begin
      for (int n = 0; n < 16; n++) key[n] = 8'($urandom);
      trial(key, t[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
