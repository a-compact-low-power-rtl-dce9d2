// tb_sbox_s1: for every byte x, drives S1 with the tower image of x and checks that the
// halves pass through and that s13 is the norm x^17, worked out in the AES field.
`timescale 1ns/1ps
module tb_sbox_s1;
  import sbox_tower_pkg::*;

  logic [7:0] s11;
  logic [3:0] s12, s13, s14;
  int checks = 0, failures = 0;

  sbox_s1 dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] t, n;
    for (int x = 0; x < 256; x++) begin
      t = to_tower(8'(x));
      n = to_tower(ref_pow(8'(x), 17));
      s11 = t; #1;
      checks++;
      if (n[7:4] != n[3:0]) begin failures++; $display("FAIL: norm of %02x not in GF(16)", x); end
      checks++;
      if (s13 !== n[3:0] || s12 !== t[7:4] || s14 !== t[3:0]) begin
        failures++;
        $display("FAIL: x=%02x s13=%h expected %h", x, s13, n[3:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
