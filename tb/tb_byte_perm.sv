// tb_byte_perm: drives the byte permutation unit with the same byte timing as the core and
// checks ShiftRows / InvShiftRows.
//   - a 16-byte block is shifted in (the load), then 16 reads with first_round = 1 must return
//     the block in ShiftRows (or InvShiftRows) order;
//   - meanwhile a second block arrives as the round loop delivers it (byte q four clocks after
//     read q of the first round), and 16 reads with first_round = 0 must return that block
//     permuted;
//   - finally a block shifted in with 16 clocks must appear on tail in order 0..15.
`timescale 1ns/1ps
module tb_byte_perm;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, shift_en = 1'b0, first_round = 1'b0, inv = 1'b0;
  byte_t      din = '0, dout, tail;
  logic [3:0] phase = '0;
  int checks = 0, failures = 0;

  byte_perm dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int src(input int p, input bit i);
    int r = p % 4, c = p / 4;
    return i ? 4 * ((c - r + 4) % 4) + r : 4 * ((c + r) % 4) + r;
  endfunction

  task automatic trial(input bit i);
    blk_t a, b;
    for (int n = 0; n < 16; n++) begin a[n] = 8'($urandom); b[n] = 8'($urandom); end
    inv = i;
    // load
    for (int n = 0; n < 16; n++) begin
      @(negedge clk);
      shift_en = 1'b1; din = a[n];
    end
    // two rounds of reads; block b arrives at clocks 4..19
    for (int t = 0; t < 32; t++) begin
      @(negedge clk);
      phase = 4'(t % 16);
      first_round = (t < 16);
      din = (t >= 4 && t < 20) ? b[t - 4] : 8'($urandom);
      #1;
      checks++;
      if (t < 16 && dout !== a[src(t, i)]) begin
        failures++;
        $display("FAIL: inv=%0d round 1 pos %0d: %02x expected %02x", i, t, dout, a[src(t, i)]);
      end
      if (t >= 16 && dout !== b[src(t - 16, i)]) begin
        failures++;
        $display("FAIL: inv=%0d round 2 pos %0d: %02x expected %02x", i, t - 16, dout, b[src(t - 16, i)]);
      end
    end
    // unload path
    for (int n = 0; n < 16; n++) begin
      @(negedge clk);
      din = a[n];
    end
    for (int n = 0; n < 16; n++) begin
      @(negedge clk);
      din = 8'($urandom);
      checks++;
      if (tail !== a[n]) begin
        failures++;
        $display("FAIL: tail byte %0d: %02x expected %02x", n, tail, a[n]);
      end
    end
    @(negedge clk);
    shift_en = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 6; t++) trial(t[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
