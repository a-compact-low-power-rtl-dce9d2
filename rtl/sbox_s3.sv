// sbox_s3: last stage of the compact S-box (GF(2^8) inversion, part 2).
//
// Two GF(2^4) multipliers scale the halves g1 (s12) and g0 (s14) of the input by the inverse
// s21 from S2; the products are crossed to give the inverse in the normal basis:
//   (g1*Y^16 + g0*Y)^-1 = (s21*g0)*Y^16 + (s21*g1)*Y.
// Purely combinational.
module sbox_s3
  import aes_pkg::*;
(
  input  logic [3:0] s12,
  input  logic [3:0] s21,
  input  logic [3:0] s14,
  output logic [7:0] s31
);
  always_comb s31 = {gf16_mul(s21, s14), gf16_mul(s21, s12)};
endmodule
