// sbox: compact AES S-box and inverse S-box sharing one GF(2^8) inverter.
//
// S_in goes through a linear map into the tower normal basis GF(2^8)/GF(2^4)/GF(2^2), is
// inverted by the three stages S1 (sbox_s1), S2 (sbox_s2) and S3 (sbox_s3), and is mapped back
// by an inverse linear map. The affine transform of AES, y_i = x_i ^ x_(i+4) ^ x_(i+5) ^
// x_(i+6) ^ x_(i+7) ^ c_i with c = 8'h63, is folded into the maps:
//   inv = 0 (SubBytes):    S_out = (A*M^-1) * inv(M * S_in)                ^ 8'h63
//   inv = 1 (InvSubBytes): S_out =  M^-1    * inv((M*A^-1) * S_in ^ 8'hA9)
// where M takes an AES byte (polynomial basis, bit i = coefficient of x^i) to the tower basis
// and 8'hA9 = M*A^-1*8'h63. Each matrix is given by its eight rows; row j holds the input bits
// that are XORed into output bit j. The stage structure follows the compact S-box of the core;
// the particular basis, and therefore the matrices, is this design's choice, derived so that
// all 256 inputs give the FIPS-197 tables. Purely combinational, no clock.
module sbox
  import aes_pkg::*;
(
  input  logic  inv,    // 0: S-box, 1: inverse S-box
  input  byte_t s_in,
  output byte_t s_out
);
  localparam byte_t M_FWD   [8] = '{8'h81, 8'h57, 8'h07, 8'h69, 8'h5D, 8'h59, 8'hA5, 8'hB9};
  localparam byte_t M_INV   [8] = '{8'hF6, 8'h1C, 8'h7F, 8'h3C, 8'h70, 8'hE2, 8'hF0, 8'h0D};
  localparam byte_t OUT_FWD [8] = '{8'h76, 8'h94, 8'hD5, 8'h23, 8'hF4, 8'h0A, 8'hEE, 8'h50};
  localparam byte_t OUT_INV [8] = '{8'h8F, 8'hBB, 8'h30, 8'hA9, 8'h59, 8'h71, 8'h5F, 8'h8E};
  localparam byte_t C_IN_INV  = 8'hA9;
  localparam byte_t C_OUT_FWD = 8'h63;

  byte_t      s11, s31;
  logic [3:0] s12, s13, s14, s21;

  // lin. map
  always_comb s11 = inv ? (mat_apply(M_INV, s_in) ^ C_IN_INV) : mat_apply(M_FWD, s_in);

  sbox_s1 u_s1 (.s11(s11), .s12(s12), .s13(s13), .s14(s14));
  sbox_s2 u_s2 (.s13(s13), .s21(s21));
  sbox_s3 u_s3 (.s12(s12), .s21(s21), .s14(s14), .s31(s31));

  // inv. lin. map
  always_comb s_out = inv ? mat_apply(OUT_INV, s31) : (mat_apply(OUT_FWD, s31) ^ C_OUT_FWD);
endmodule
