// sbox_s2: middle stage of the compact S-box, the inverse in GF(2^4).
//
// The input d = d1*Z^4 + d0*Z (d1 = s13[3:2], d0 = s13[1:0], elements of GF(2^2)) is inverted
// with the same normal-basis formula one level down:
//   e = d1*d0 + N*(d1+d0)^2,   e^-1 = e^2 (a swap in GF(2^2)),
//   d^-1 = (e^-1*d0)*Z^4 + (e^-1*d1)*Z.
// Zero maps to zero, as the S-box requires. Purely combinational.
module sbox_s2
  import aes_pkg::*;
(
  input  logic [3:0] s13,
  output logic [3:0] s21
);
  logic [1:0] e, e_inv;
  always_comb begin
    e     = gf4_mul(s13[3:2], s13[1:0]) ^ gf4_scl_n(gf4_sq(s13[3:2] ^ s13[1:0]));
    e_inv = gf4_sq(e);
    s21   = {gf4_mul(e_inv, s13[1:0]), gf4_mul(e_inv, s13[3:2])};
  end
endmodule
