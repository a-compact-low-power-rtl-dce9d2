// byte_perm: byte permutation unit. Holds the state and applies ShiftRows (or InvShiftRows)
// by reading a byte stream back in permuted order.
//
// Bytes enter at din, one per clock while shift_en is high, and move along a DEPTH-byte shift
// register (sr[0] is the newest). In the clock where the datapath wants state position p
// (column p/4, row p%4, given on `phase`), dout returns the byte that ShiftRows sends to p:
//   source q = 4*((col + row) mod 4) + row      (inv = 0, ShiftRows)
//   source q = 4*((col - row) mod 4) + row      (inv = 1, InvShiftRows)
// Inside the round loop, source byte q of a round arrived q-12 clocks after that round's first
// read, so it has waited d = p - q + 12 clocks (0..24). In the first round the bytes came from
// the 16-clock load, 16 clocks ahead, so d = p - q + 16 (4..28). d = 0 takes din directly.
// tail = sr[15] gives the stored result byte by byte for unloading.
// The unit's existence and place in the loop follow the core; this shift-register-with-taps
// form and the resulting depth of 28 are this design's choice.
module byte_perm
  import aes_pkg::*;
#(
  parameter int unsigned DEPTH = 28
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       shift_en,
  input  byte_t      din,
  input  logic [3:0] phase,
  input  logic       first_round,
  input  logic       inv,
  output byte_t      dout,
  output byte_t      tail
);
  byte_t sr [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) sr[k] <= '0;
    end else if (shift_en) begin
      sr[0] <= din;
      for (int k = 1; k < DEPTH; k++) sr[k] <= sr[k-1];
    end
  end

  logic [1:0] row, col, src_col;
  logic [4:0] delay;

  always_comb begin
    row     = phase[1:0];
    col     = phase[3:2];
    src_col = inv ? (col - row) : (col + row);   // mod 4 by width
    // p - q = 4*(col - src_col); delay = that + 12 (or + 16 in the first round)
    delay   = 5'(({1'b0, col, 2'b00} - {1'b0, src_col, 2'b00}) + (first_round ? 5'd16 : 5'd12));
    dout    = (delay == 5'd0) ? din : sr[delay - 5'd1];
  end

  assign tail = sr[15];
endmodule
