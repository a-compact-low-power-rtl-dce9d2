// tb_sbox: exhaustive test of the compact S-box / inverse S-box.
//
// All 256 inputs are applied in both modes and compared with the FIPS-197 S-box computed by
// the reference model (multiplicative inverse by exponentiation, then the affine transform).
// A few published table entries are also checked directly.
`timescale 1ns/1ps
module tb_sbox;
  import aes_ref_pkg::*;

  logic       inv;
  logic [7:0] s_in, s_out;
  int checks = 0, failures = 0;

  sbox dut (.inv, .s_in, .s_out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [7:0] exp;
    for (int x = 0; x < 256; x++) begin
      inv = 1'b0; s_in = 8'(x); #1;
      exp = ref_sbox(8'(x));
      check(s_out == exp, $sformatf("S(%02x) = %02x, expected %02x", x, s_out, exp));
      inv = 1'b1; #1;
      exp = ref_inv_sbox(8'(x));
      check(s_out == exp, $sformatf("InvS(%02x) = %02x, expected %02x", x, s_out, exp));
    end
    inv = 1'b0; s_in = 8'h00; #1; check(s_out == 8'h63, "S(00) = 63");
    s_in = 8'h53; #1;             check(s_out == 8'hED, "S(53) = ED");
    inv = 1'b1; s_in = 8'h63; #1; check(s_out == 8'h00, "InvS(63) = 00");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
