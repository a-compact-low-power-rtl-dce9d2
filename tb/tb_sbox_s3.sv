// tb_sbox_s3: for every byte x, drives S3 with the halves of the tower image of x and with the
// inverse of its norm (both worked out in the AES field) and checks that s31 is the tower
// image of x^-1.
`timescale 1ns/1ps
module tb_sbox_s3;
  import sbox_tower_pkg::*;

  logic [3:0] s12, s21, s14;
  logic [7:0] s31;
  int checks = 0, failures = 0;

  sbox_s3 dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] t, ninv, e;
    for (int x = 0; x < 256; x++) begin
      t    = to_tower(8'(x));
      ninv = to_tower(ref_pow(ref_pow(8'(x), 17), 254));
      e    = to_tower(ref_pow(8'(x), 254));
      s12 = t[7:4]; s14 = t[3:0]; s21 = ninv[3:0]; #1;
      checks++;
      if (s31 !== e) begin
        failures++;
        $display("FAIL: x=%02x s31=%02x expected %02x", x, s31, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
