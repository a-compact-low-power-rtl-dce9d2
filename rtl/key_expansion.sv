// key_expansion: byte-serial, on-the-fly AES-128 key schedule, forward and backward.
//
// The current round key K sits in a 16-byte shift register kr (kr[n] = byte n at the start of
// a round; byte n is row n%4, column n/4). In each of the 16 steps of a round the register
// moves down one place and the newly computed byte enters at kr[15], so after 16 steps it holds
// the next round key. With step n and old byte m found at kr[m-n]:
//   forward  (inv = 0, encryption, K_r from K_(r-1)):
//     n < 4 : new = kr[0] ^ S(word3 byte (n+1)%4) ^ (n == 0 ? rcon : 0)   tap kr[13], kr[9] at n=3
//     n >= 4: new = kr[0] ^ kr[12]            (kr[12] is the new byte n-4)
//   backward (inv = 1, decryption, K_(r-1) from K_r, loaded with the last round key):
//     n < 4 : new = kr[0] ^ S(w3 ^ w2 byte (n+1)%4) ^ (n == 0 ? rcon : 0)
//     n >= 4: new = kr[0] ^ kd[3]             (kd delays kr[0] by 4 steps: the old byte n-4)
// S is the forward S-box (its own instance, "S-box 2"); the round constant comes from rcon.
// Outputs: new_byte is the byte computed in this clock (byte n of the next key in step n);
// rk_byte = kr[12] is the same byte four clocks later, which lines up the raw round key with
// the state bytes leaving the parallel-to-serial converter.
// load shifts key_in in (16 clocks load a key); drain rotates the register without changing it.
// The key schedule itself is FIPS-197; the serial arrangement, the taps and the 4-byte delay kd
// for the backward direction are this design's choice.
// MODE: MODE_ENC_DEC (default) follows inv; MODE_ENC is forward only and MODE_DEC backward only
// (inv is then ignored, and the round constant uses the matching rcon variant).
module key_expansion
  import aes_pkg::*;
#(
  parameter core_mode_e MODE = MODE_ENC_DEC
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,      // shift key_in in
  input  logic       run,       // compute step `step` of round `rnd`
  input  logic       drain,     // rotate only
  input  logic       inv,       // 0: forward (encryption), 1: backward (decryption)
  input  logic [3:0] rnd,       // round index 0..9
  input  logic [3:0] step,      // byte index 0..15 within the round
  input  byte_t      key_in,
  output byte_t      new_byte,
  output byte_t      rk_byte
);
  byte_t kr [16];
  byte_t kd [4];
  byte_t sb_in, sb_out, rc;
  logic  bwd;

  assign bwd = (MODE == MODE_DEC) || (MODE == MODE_ENC_DEC && inv);

  sbox              u_sbox2 (.inv(1'b0), .s_in(sb_in), .s_out(sb_out));
  rcon #(.MODE(MODE)) u_rcon (.r_in(rnd), .inv_in(inv), .rcon_out(rc));

  always_comb begin
    if (bwd) sb_in = (step == 4'd3) ? (kr[9] ^ kr[5]) : (kr[13] ^ kr[9]);
    else     sb_in = (step == 4'd3) ? kr[9] : kr[13];
    if (step < 4'd4)
      new_byte = kr[0] ^ sb_out ^ ((step == 4'd0) ? rc : 8'h00);
    else
      new_byte = kr[0] ^ (bwd ? kd[3] : kr[12]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 16; k++) kr[k] <= '0;
      for (int k = 0; k < 4; k++)  kd[k] <= '0;
    end else if (load || run || drain) begin
      for (int k = 0; k < 15; k++) kr[k] <= kr[k+1];
      kr[15] <= load ? key_in : (run ? new_byte : kr[0]);
      kd[0]  <= kr[0];
      for (int k = 1; k < 4; k++) kd[k] <= kd[k-1];
    end
  end

  assign rk_byte = kr[12];
endmodule
