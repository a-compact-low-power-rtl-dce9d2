// aes_pkg: types, constants and finite-field helpers shared by the 8-bit AES core.
//
// The core works on AES-128: a 16-byte state and a 16-byte key, both moved one byte per clock
// in column-major order (byte n = row n%4, column n/4, as in FIPS-197). One round takes 16
// clocks and there are 10 rounds, so a block needs 160 round clocks.
//
// The S-box arithmetic uses a tower of normal bases, GF(2^8)/GF(2^4)/GF(2^2), as the compact
// S-box of the core does:
//   GF(2^2): basis (W^2, W), W^2+W+1 = 0. Element {b1,b0} = b1*W^2 + b0*W; one = 2'b11.
//   GF(2^4): basis (Z^4, Z) over GF(2^2), Z^2+Z+N = 0 with N = W^2 (2'b10). One = 4'hF.
//   GF(2^8): basis (Y^16, Y) over GF(2^4), Y^2+Y+NU = 0 with NU = 4'h8 (N*Z^4). One = 8'hFF.
// The choice of NU and of the basis-change matrices in sbox.sv is this design's own: the
// structure (lin. map, S1, S2, S3, inv. lin. map) follows the compact S-box it implements.
package aes_pkg;

  typedef logic [7:0] byte_t;
  typedef byte_t      column_t [4];

  // Which directions a core supports: both (the main configuration), or only one of them.
  typedef enum logic [1:0] {
    MODE_ENC_DEC = 2'd0,
    MODE_ENC     = 2'd1,
    MODE_DEC     = 2'd2
  } core_mode_e;

  localparam int unsigned NR_ROUNDS  = 10;  // AES-128
  localparam int unsigned ROUND_CLKS = 16;  // one byte per clock


  // ---------------- GF(2^2), normal basis (W^2, W) ----------------
  function automatic logic [1:0] gf4_mul(input logic [1:0] a, input logic [1:0] b);
    logic e;
    e = (a[1] ^ a[0]) & (b[1] ^ b[0]);
    return {(a[1] & b[1]) ^ e, (a[0] & b[0]) ^ e};
  endfunction

  // Squaring (and inversion) in a normal basis is a swap of the two coordinates.
  function automatic logic [1:0] gf4_sq(input logic [1:0] a);
    return {a[0], a[1]};
  endfunction

  // Scale by N = W^2.
  function automatic logic [1:0] gf4_scl_n(input logic [1:0] a);
    return {a[0], a[1] ^ a[0]};
  endfunction

  // ---------------- GF(2^4), normal basis (Z^4, Z) ----------------
  // Karatsuba-style: three GF(2^2) multipliers, one scaled by N.
  function automatic logic [3:0] gf16_mul(input logic [3:0] a, input logic [3:0] b);
    logic [1:0] e;
    e = gf4_scl_n(gf4_mul(a[3:2] ^ a[1:0], b[3:2] ^ b[1:0]));
    return {gf4_mul(a[3:2], b[3:2]) ^ e, gf4_mul(a[1:0], b[1:0]) ^ e};
  endfunction

  // Square and scale by NU: NU * a^2. Squaring is linear over GF(2), so the whole operation
  // is a fixed 4x4 bit matrix (worked out from gf16_mul(gf16_mul(a, a), 4'h8)).
  function automatic logic [3:0] gf16_sq_scl(input logic [3:0] a);
    return {a[3], a[3] ^ a[2], ^a, a[2] ^ a[0]};
  endfunction

  // Linear map of an 8x8 bit matrix given as rows: out[j] = parity(row[j] & x).
  function automatic byte_t mat_apply(input byte_t rows [8], input byte_t x);
    byte_t y;
    for (int j = 0; j < 8; j++) y[j] = ^(rows[j] & x);
    return y;
  endfunction

  // ---------------- GF(2^8) with the AES polynomial x^8+x^4+x^3+x+1 ----------------
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  // Constant multipliers needed by MixColumns (02, 03) and InvMixColumns (09, 0B, 0D, 0E).
  function automatic byte_t gmul_const(input byte_t a, input logic [3:0] c);
    byte_t a2, a4, a8, r;
    a2 = xtime(a);
    a4 = xtime(a2);
    a8 = xtime(a4);
    r  = (c[0] ? a : 8'h00) ^ (c[1] ? a2 : 8'h00) ^ (c[2] ? a4 : 8'h00) ^ (c[3] ? a8 : 8'h00);
    return r;
  endfunction

endpackage
