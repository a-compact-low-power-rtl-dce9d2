// sbox_s1: first stage of the compact S-box (GF(2^8) inversion, part 1).
//
// The input s11 is an element g1*Y^16 + g0*Y of GF(2^8) in the tower normal basis, with
// g1 = s11[7:4] and g0 = s11[3:0] in GF(2^4). The stage passes g1 and g0 on (s12, s14) and
// computes the GF(2^4) value whose inverse is needed:
//   s13 = g1*g0 + NU*(g1+g0)^2
// using one GF(2^4) multiplier and one square-and-scale unit, as in the S1 sub-block of the
// compact S-box. Purely combinational.
module sbox_s1
  import aes_pkg::*;
(
  input  logic [7:0] s11,
  output logic [3:0] s12,
  output logic [3:0] s13,
  output logic [3:0] s14
);
  always_comb begin
    s12 = s11[7:4];
    s14 = s11[3:0];
    s13 = gf16_mul(s11[7:4], s11[3:0]) ^ gf16_sq_scl(s11[7:4] ^ s11[3:0]);
  end
endmodule
