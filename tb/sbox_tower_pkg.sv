// sbox_tower_pkg: expected values for the three inner stages of the compact S-box, computed
// with plain AES-field arithmetic from aes_ref_pkg rather than with tower-field formulas.
//
// TOWER maps an AES byte (polynomial basis) into the tower normal basis used by the S-box
// (the same eight matrix rows as its forward input map). In that basis:
//   - an element of the subfield GF(2^4) looks like {d, d};
//   - the value S1 must produce for input M*x is the norm x^17 (an element of GF(2^4));
//   - the inverse of a subfield element d is the nibble of M*((M^-1{d,d})^254);
//   - S3 must produce M*(x^-1).
package sbox_tower_pkg;
  import aes_ref_pkg::*;

  localparam logic [7:0] TOWER [8] = '{8'h81, 8'h57, 8'h07, 8'h69, 8'h5D, 8'h59, 8'hA5, 8'hB9};

  function automatic logic [7:0] to_tower(input logic [7:0] x);
    logic [7:0] y;
    for (int j = 0; j < 8; j++) y[j] = ^(TOWER[j] & x);
    return y;
  endfunction

  function automatic logic [7:0] from_tower(input logic [7:0] t);
    for (int x = 0; x < 256; x++)
      if (to_tower(8'(x)) == t) return 8'(x);
    return 8'h00;
  endfunction

  function automatic logic [7:0] ref_pow(input logic [7:0] a, input int e);
    logic [7:0] r = 8'h01;
    for (int k = 0; k < e; k++) r = ref_mul(r, a);
    return r;
  endfunction
endpackage
