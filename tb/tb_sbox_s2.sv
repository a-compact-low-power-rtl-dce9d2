// tb_sbox_s2: checks the GF(2^4) inverter on all 16 inputs. The expected inverse of d is
// found in the AES field: map {d,d} back to the polynomial basis, raise to the power 254, and
// map forward again. Zero must map to zero.
`timescale 1ns/1ps
module tb_sbox_s2;
  import sbox_tower_pkg::*;

  logic [3:0] s13, s21;
  int checks = 0, failures = 0;

  sbox_s2 dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e;
    for (int d = 0; d < 16; d++) begin
      e = to_tower(ref_pow(from_tower({4'(d), 4'(d)}), 254));
      s13 = 4'(d); #1;
      checks++;
      if (s21 !== e[3:0] || e[7:4] != e[3:0]) begin
        failures++;
        $display("FAIL: d=%h s21=%h expected %h", d, s21, e[3:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
