// p2s: parallel-to-serial converter, four bytes wide.
//
// When load is high the four bytes of din are captured; otherwise, when shift is high, the
// bytes move down one place per clock. dout is always byte 0, so a column loaded at the end of
// clock t is presented as row 0 in clock t+1, row 1 in t+2, and so on. Load wins over shift.
module p2s
  import aes_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load,
  input  logic    shift,
  input  column_t din,
  output byte_t   dout
);
  byte_t q [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) q[k] <= '0;
    end else if (load) begin
      for (int k = 0; k < 4; k++) q[k] <= din[k];
    end else if (shift) begin
      for (int k = 0; k < 3; k++) q[k] <= q[k+1];
      q[3] <= '0;
    end
  end

  assign dout = q[0];
endmodule
