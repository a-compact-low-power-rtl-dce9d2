// aes_ref_pkg: straightforward AES-128 reference model for the testbenches.
//
// Written directly from FIPS-197 in the polynomial basis and without any of the hardware's
// structure: the S-box is the multiplicative inverse (a^254, by repeated multiplication)
// followed by the affine transform; the inverse S-box is found by searching the forward one;
// the cipher and the (standard, not equivalent) inverse cipher work on whole 16-byte states.
package aes_ref_pkg;

  typedef logic [7:0] blk_t [16];   // byte n = row n%4, column n/4

  function automatic logic [7:0] ref_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r, x;
    r = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = {x[6:0], 1'b0} ^ (x[7] ? 8'h1B : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] a);
    logic [7:0] inv, y;
    inv = 8'h01;
    for (int k = 0; k < 254; k++) inv = ref_mul(inv, a);
    if (a == 8'h00) inv = 8'h00;
    for (int i = 0; i < 8; i++)
      y[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return y ^ 8'h63;
  endfunction

  // Inverse table, filled by searching the forward S-box the first time it is needed.
  logic [7:0] inv_tab [256];
  bit         inv_tab_ok = 1'b0;

  function automatic logic [7:0] ref_inv_sbox(input logic [7:0] y);
    if (!inv_tab_ok) begin
      for (int x = 0; x < 256; x++) inv_tab[ref_sbox(8'(x))] = 8'(x);
      inv_tab_ok = 1'b1;
    end
    return inv_tab[y];
  endfunction

  // Round keys 0..10, each 16 bytes.
  function automatic void ref_expand(input blk_t key, output blk_t rk [11]);
    logic [7:0] w [44][4];
    logic [7:0] t [4];
    logic [7:0] rc;
    rc = 8'h01;
    for (int i = 0; i < 4; i++)
      for (int b = 0; b < 4; b++) w[i][b] = key[4*i+b];
    for (int i = 4; i < 44; i++) begin
      for (int b = 0; b < 4; b++) t[b] = w[i-1][b];
      if (i % 4 == 0) begin
        t = '{ref_sbox(w[i-1][1]) ^ rc, ref_sbox(w[i-1][2]), ref_sbox(w[i-1][3]), ref_sbox(w[i-1][0])};
        rc = ref_mul(rc, 8'h02);
      end
      for (int b = 0; b < 4; b++) w[i][b] = w[i-4][b] ^ t[b];
    end
    for (int r = 0; r < 11; r++)
      for (int n = 0; n < 16; n++) rk[r][n] = w[4*r + n/4][n%4];
  endfunction

  function automatic blk_t ref_mixcol(input blk_t s, input bit inv);
    blk_t o;
    logic [7:0] c [4];
    for (int j = 0; j < 4; j++) begin
      c = '{s[4*j], s[4*j+1], s[4*j+2], s[4*j+3]};
      for (int i = 0; i < 4; i++) begin
        if (!inv)
          o[4*j+i] = ref_mul(c[i], 8'h02) ^ ref_mul(c[(i+1)%4], 8'h03) ^ c[(i+2)%4] ^ c[(i+3)%4];
        else
          o[4*j+i] = ref_mul(c[i], 8'h0E) ^ ref_mul(c[(i+1)%4], 8'h0B) ^
                     ref_mul(c[(i+2)%4], 8'h0D) ^ ref_mul(c[(i+3)%4], 8'h09);
      end
    end
    return o;
  endfunction

  function automatic blk_t ref_encrypt(input blk_t pt, input blk_t key);
    blk_t rk [11];
    blk_t s, t;
    ref_expand(key, rk);
    for (int n = 0; n < 16; n++) s[n] = pt[n] ^ rk[0][n];
    for (int r = 1; r <= 10; r++) begin
      for (int n = 0; n < 16; n++) t[n] = ref_sbox(s[4*(((n/4) + (n%4)) % 4) + n%4]);
      if (r < 10) t = ref_mixcol(t, 1'b0);
      for (int n = 0; n < 16; n++) s[n] = t[n] ^ rk[r][n];
    end
    return s;
  endfunction

  function automatic blk_t ref_decrypt(input blk_t ct, input blk_t key);
    blk_t rk [11];
    blk_t s, t;
    ref_expand(key, rk);
    for (int n = 0; n < 16; n++) s[n] = ct[n] ^ rk[10][n];
    for (int r = 9; r >= 0; r--) begin
      for (int n = 0; n < 16; n++) t[n] = ref_inv_sbox(s[4*(((n/4) - (n%4) + 4) % 4) + n%4]);
      for (int n = 0; n < 16; n++) t[n] = t[n] ^ rk[r][n];
      if (r > 0) t = ref_mixcol(t, 1'b1);
      s = t;
    end
    return s;
  endfunction

endpackage
