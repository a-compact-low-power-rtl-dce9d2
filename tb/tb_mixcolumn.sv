// tb_mixcolumn: feeds random columns byte by byte (rows 0..3) and checks the column output in
// the clock of row 3 against the reference MixColumns / InvMixColumns, in both modes and with
// bypass. Also checks the FIPS-197 example column db 13 53 45 -> 8e 4d a1 bc and back.
`timescale 1ns/1ps
module tb_mixcolumn;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, en = 1'b0, inv = 1'b0, bypass = 1'b0;
  logic [1:0] row = '0;
  byte_t      din = '0;
  column_t    col_out;
  int checks = 0, failures = 0;

  mixcolumn dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_col(input logic [7:0] c [4], input bit i, input bit b);
    blk_t s, e;
    for (int n = 0; n < 16; n++) s[n] = 8'h00;
    for (int k = 0; k < 4; k++) s[k] = c[k];
    e = b ? s : ref_mixcol(s, i);
    inv = i; bypass = b;
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      en = 1'b1; row = 2'(k); din = c[k];
      if (k == 3) begin
        #1;
        for (int m = 0; m < 4; m++) begin
          checks++;
          if (col_out[m] !== e[m]) begin
            failures++;
            $display("FAIL: inv=%0d bypass=%0d row %0d: %02x expected %02x", i, b, m, col_out[m], e[m]);
          end
        end
      end
    end
    @(negedge clk);
    en = 1'b0;
  endtask

  initial begin
    logic [7:0] c [4];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    c = '{8'hDB, 8'h13, 8'h53, 8'h45};
    do_col(c, 1'b0, 1'b0);
    c = '{8'h8E, 8'h4D, 8'hA1, 8'hBC};
    do_col(c, 1'b1, 1'b0);
    for (int t = 0; t < 60; t++) begin
      for (int k = 0; k < 4; k++) c[k] = 8'($urandom);
      do_col(c, t[0], t % 5 == 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
