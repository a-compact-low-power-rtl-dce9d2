// aes_core: compact 8-bit AES-128 encryption/decryption core.
//
// One byte of state moves per clock around a loop: XOR with a round-key byte -> byte
// permutation (ShiftRows / InvShiftRows) -> S-box or inverse S-box -> MixColumns or
// InvMixColumns (collected a column at a time) -> parallel-to-serial converter -> back to the
// XOR. Ten rounds of 16 clocks make 160 round clocks; four more clocks drain the last column.
// The key schedule runs alongside, byte-serially, forward for encryption and backward for
// decryption. Decryption uses the equivalent inverse cipher: the round keys of rounds 1..9 are
// passed through a second (inverse) MixColumns unit and parallel-to-serial converter, and a
// multiplexer picks them instead of the raw round key.
//
// Protocol (all inputs sampled on the rising clock edge, rst_n asynchronous, active low):
//   load   : hold load_in for 16 clocks with data_in/key_in carrying bytes 0..15 (byte n is
//            row n%4, column n/4). Encryption takes the cipher key; decryption takes the
//            last (round-10) round key, as the key schedule is run backwards.
//   start  : pulse start_in with inv_in = 0 (encrypt) or 1 (decrypt). busy_out is high for
//            164 clocks; then comp rises.
//   unload : hold unload_in for 16 clocks; data_out shows result byte 0 before the first
//            unload clock and the next byte after each unload clock. load_in may be held in
//            the same clocks to load the next block while the result leaves.
// load_in, unload_in and start_in are ignored while busy_out is high.
// MODE selects the configuration: MODE_ENC_DEC (default) is the combined core; MODE_ENC is the
// encryption-only core (no key-side MixColumns; the inverse paths are constant-off and left to
// synthesis to remove) and MODE_DEC the decryption-only core; in both inv_in is ignored.
// Lint note: Verilator reports rst_n as both synchronous and asynchronous. That comes from the
// disable iff (!rst_n) of the assertions in aes_ctrl; every register is reset asynchronously.
// The block diagram (units and the key-side MixColumns/multiplexer for decryption), the three
// configurations and the port list follow the core; timing, the protocol details and the
// 4 drain clocks are this design's own.
module aes_core
  import aes_pkg::*;
#(
  parameter core_mode_e MODE = MODE_ENC_DEC
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load_in,
  input  logic       unload_in,
  input  logic       start_in,
  input  logic       inv_in,
  input  logic [7:0] key_in,
  input  logic [7:0] data_in,
  output logic [7:0] data_out,
  output logic       busy_out,
  output logic       comp
);
  logic       running, lookup, first_round, last_round, col_last, mode_inv;
  logic [3:0] rnd, step;
  byte_t      perm_din, perm_dout, sb_out, dp2s_out, kp2s_out, ke_new, rk_byte, key_sel;
  column_t    dcol;
  logic       load_q, unload_q, dec;

  assign load_q   = load_in   && !running;
  assign unload_q = unload_in && !running;

  aes_ctrl u_ctrl (
    .clk, .rst_n, .start_in, .load_in(load_q), .inv_in,
    .running, .lookup, .rnd, .step, .first_round, .last_round, .col_last, .mode_inv,
    .busy_out, .comp
  );

  // Direction of the current run.
  assign dec = (MODE == MODE_DEC) || (MODE == MODE_ENC_DEC && mode_inv);

  // AddRoundKey: raw round key for encryption, InvMixColumns'ed round key for decryption.
  assign key_sel  = dec ? kp2s_out : rk_byte;
  assign perm_din = running ? (dp2s_out ^ key_sel) : (data_in ^ key_in);

  byte_perm u_perm (
    .clk, .rst_n, .shift_en(running || load_q || unload_q), .din(perm_din),
    .phase(step), .first_round, .inv(dec), .dout(perm_dout), .tail(data_out)
  );

  sbox u_sbox (.inv(dec), .s_in(perm_dout), .s_out(sb_out));

  mixcolumn u_mix (
    .clk, .rst_n, .en(lookup), .row(step[1:0]), .inv(dec), .bypass(last_round),
    .din(sb_out), .col_out(dcol)
  );

  p2s u_p2s (.clk, .rst_n, .load(col_last), .shift(running), .din(dcol), .dout(dp2s_out));

  key_expansion #(.MODE(MODE)) u_key (
    .clk, .rst_n, .load(load_q), .run(lookup), .drain(running && !lookup), .inv(mode_inv),
    .rnd, .step, .key_in, .new_byte(ke_new), .rk_byte
  );

  // Key-side InvMixColumns and converter, present only where decryption is supported.
  if (MODE != MODE_ENC) begin : g_key_mix
    column_t kcol;

    mixcolumn u_kmix (
      .clk, .rst_n, .en(lookup), .row(step[1:0]), .inv(1'b1), .bypass(last_round),
      .din(ke_new), .col_out(kcol)
    );

    p2s u_kp2s (.clk, .rst_n, .load(col_last), .shift(running), .din(kcol), .dout(kp2s_out));
  end else begin : g_no_key_mix
    assign kp2s_out = rk_byte;
  end
endmodule
