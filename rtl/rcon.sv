// rcon: round-constant generator of the key expansion, as two-level logic instead of a
// 10-way multiplexer.
//
// r_in is the 4-bit round index 0..9 of the running operation. For encryption (inv_in = 0)
// the index goes straight to "Block 2", which maps 0..9 to 01,02,04,08,10,20,40,80,1B,36.
// For decryption (inv_in = 1) "Block 1" first turns r_in into temp = 9 - r_in, so the
// constants come out in reverse order (36 first), as the backward key expansion needs them.
// Both blocks are the sum-of-products equations of the core; indices 10..15 never occur and
// their outputs are don't-care. Purely combinational.
// MODE selects the variant: MODE_ENC_DEC (default) is the structure above; MODE_ENC keeps only
// Block 2 and ignores inv_in; MODE_DEC uses a separate two-level decoder that gives 9 - r_in
// order directly (36 1B 80 40 20 10 08 04 02 01) and ignores inv_in.
module rcon
  import aes_pkg::*;
#(
  parameter core_mode_e MODE = MODE_ENC_DEC
) (
  input  logic [3:0] r_in,
  input  logic       inv_in,
  output byte_t      rcon_out
);
  logic [3:0] temp, r;
  byte_t      enc_rc, dec_rc;

  // Block 1: temp = 9 - r_in for r_in in 0..9.
  always_comb begin
    temp[3] = ~r_in[3] & ~r_in[2] & ~r_in[1];
    temp[2] = r_in[2] ^ r_in[1];
    temp[1] = r_in[1];
    temp[0] = ~r_in[0];
    r       = (MODE == MODE_ENC_DEC && inv_in) ? temp : r_in;
  end

  // Block 2: encryption-order round constant.
  always_comb begin
    enc_rc[7] =  r[2] &  r[1] &  r[0];
    enc_rc[6] =  r[2] &  r[1] & ~r[0];
    enc_rc[5] = (r[2] & ~r[1] &  r[0]) | (r[3] & r[0]);
    enc_rc[4] =  r[3] | (r[2] & ~r[1] & ~r[0]);
    enc_rc[3] = (~r[2] & ~r[0] & r[3]) | (r[0] & ~r[2] & r[1]);
    enc_rc[2] = (~r[2] & ~r[0] & r[1]) | (r[3] & r[0]);
    enc_rc[1] =  r[3] | (~r[2] & ~r[1] & r[0]);
    enc_rc[0] = ~r[2] & ~r[1] & ~r[0];
  end

  // Decryption-only decoder: round constant rcon(9 - r_in) straight from r_in.
  always_comb begin
    dec_rc[7] = ~r_in[2] & ~r_in[0] &  r_in[1];
    dec_rc[6] = ~r_in[2] &  r_in[1] &  r_in[0];
    dec_rc[5] = ~r_in[3] & ~r_in[1] & ~r_in[0];
    dec_rc[4] = (~r_in[3] & ~r_in[2] & ~r_in[1]) | (~r_in[3] & ~r_in[1] & r_in[0]);
    dec_rc[3] = (~r_in[3] & ~r_in[2] & ~r_in[1] & r_in[0]) | (r_in[2] & r_in[1] & ~r_in[0]);
    dec_rc[2] = (~r_in[3] & ~r_in[2] & ~r_in[1] & ~r_in[0]) | (r_in[2] & r_in[1] & r_in[0]);
    dec_rc[1] = (~r_in[2] & ~r_in[1] & ~r_in[3]) | (r_in[3] & ~r_in[0]);
    dec_rc[0] = ~r_in[2] & ~r_in[1] & r_in[0];
  end

  assign rcon_out = (MODE == MODE_DEC) ? dec_rc : enc_rc;
endmodule
