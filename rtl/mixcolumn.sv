// mixcolumn: byte-serial MixColumns / InvMixColumns.
//
// Bytes of one state column arrive one per clock, row 0 first, with `en` high and `row` giving
// the row. Rows 0..2 are held in three registers; in the clock that brings row 3 the unit
// combines the three held bytes with the incoming one and presents the whole transformed
// column on col_out (valid while en && row == 3), ready to be loaded in parallel into the
// parallel-to-serial converter. inv selects InvMixColumns (coefficients 0E,0B,0D,09) instead
// of MixColumns (02,03,01,01); bypass passes the column through untouched, for the last round.
// The byte-serial collection is this design's own arrangement.
module mixcolumn
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [1:0] row,
  input  logic       inv,
  input  logic       bypass,
  input  byte_t      din,
  output column_t    col_out
);
  byte_t   held [3];
  column_t col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) held[k] <= '0;
    end else if (en && row != 2'd3) begin
      held[row] <= din;
    end
  end

  always_comb begin
    logic [3:0] coef [4];
    col[0] = held[0];
    col[1] = held[1];
    col[2] = held[2];
    col[3] = din;
    if (inv) coef = '{4'hE, 4'hB, 4'hD, 4'h9};
    else     coef = '{4'h2, 4'h3, 4'h1, 4'h1};
    for (int i = 0; i < 4; i++) begin
      col_out[i] = '0;
      for (int k = 0; k < 4; k++)
        col_out[i] ^= gmul_const(col[k], coef[(k - i + 4) % 4]);
      if (bypass) col_out[i] = col[i];
    end
  end
endmodule
