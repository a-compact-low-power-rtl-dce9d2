// tb_p2s: loads random 4-byte columns and checks that they come out on dout in order 0..3,
// one byte per clock after the load, that shifting pauses when shift is low, and that a load
// takes priority over a shift.
`timescale 1ns/1ps
module tb_p2s;
  import aes_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0;
  column_t din;
  byte_t   dout;
  int checks = 0, failures = 0;

  p2s dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    byte_t c [4];
    for (int k = 0; k < 4; k++) din[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      for (int k = 0; k < 4; k++) begin c[k] = 8'($urandom); din[k] = c[k]; end
      load = 1'b1; shift = 1'b1;           // load wins over shift
      @(negedge clk);
      load = 1'b0;
      for (int k = 0; k < 4; k++) begin
        for (int j = 0; j < 4; j++) din[j] = 8'($urandom);
        check(dout == c[k], $sformatf("column %0d byte %0d: %02x expected %02x", t, k, dout, c[k]));
        if (t % 3 == 0 && k == 1) begin  // pause one clock
          shift = 1'b0;
          @(negedge clk);
          check(dout == c[k], "dout changed while shift was low");
          shift = 1'b1;
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
