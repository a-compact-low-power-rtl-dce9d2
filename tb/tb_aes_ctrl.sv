// tb_aes_ctrl: checks the sequencer's timing. After a start pulse busy_out must be high for
// exactly 164 clocks, of which the first 160 are round clocks with rnd/step counting
// 0/0 .. 9/15, col_last on every fourth one (40 in all), first_round during the first 16 and
// last_round during the last 16. comp must rise at the end and fall at the next load; a start
// pulse while busy must be ignored; inv_in must be latched at start.
`timescale 1ns/1ps
module tb_aes_ctrl;
  logic       clk = 1'b0, rst_n = 1'b0, start_in = 1'b0, load_in = 1'b0, inv_in = 1'b0;
  logic       running, lookup, first_round, last_round, col_last, mode_inv, busy_out, comp;
  logic [3:0] rnd, step;
  int checks = 0, failures = 0;

  aes_ctrl dut (.*);
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

  task automatic one_run(input bit i);
    int busy = 0, look = 0, cols = 0, bad_seq = 0;
    @(negedge clk);
    start_in = 1'b1; inv_in = i;
    @(negedge clk);
    start_in = 1'b0; inv_in = ~i;
    while (busy_out) begin
      if (lookup) begin
        if (rnd != 4'(look / 16) || step != 4'(look % 16)) bad_seq++;
        if (first_round != (look < 16) || last_round != (look >= 144)) bad_seq++;
        if (col_last) cols++;
        look++;
      end
      if (busy == 50) start_in = 1'b1;     // must be ignored
      if (busy == 51) start_in = 1'b0;
      if (mode_inv != i) bad_seq++;
      busy++;
      @(negedge clk);
    end
    check(busy == 164, $sformatf("busy for %0d clocks, expected 164", busy));
    check(look == 160, $sformatf("%0d round clocks, expected 160", look));
    check(cols == 40, $sformatf("%0d column ends, expected 40", cols));
    check(bad_seq == 0, $sformatf("%0d sequence errors", bad_seq));
    check(comp, "comp not raised");
    @(negedge clk);
    check(comp && !busy_out, "comp must hold until the next load");
    load_in = 1'b1;
    @(negedge clk);
    load_in = 1'b0;
    check(!comp, "load must clear comp");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(!busy_out && !comp, "idle after reset");
    rst_n = 1'b1;
    one_run(1'b0);
    one_run(1'b1);
    one_run(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
