// tb_rcon: checks the round-constant logic for every round index in both directions.
// Expected values are computed by repeated doubling in GF(2^8): rcon(k) = 02^k.
// Encryption (inv_in = 0) must give rcon(r_in); decryption (inv_in = 1) rcon(9 - r_in).
// The encryption-only variant must give rcon(r_in) and the decryption-only variant
// rcon(9 - r_in), both whatever inv_in is.
`timescale 1ns/1ps
module tb_rcon;
  import aes_ref_pkg::*;
  import aes_pkg::*;

  logic [3:0] r_in;
  logic       inv_in;
  logic [7:0] rcon_out, rcon_enc, rcon_dec;
  int checks = 0, failures = 0;

  rcon dut (.r_in, .inv_in, .rcon_out);
  rcon #(.MODE(MODE_ENC)) dut_enc (.r_in, .inv_in, .rcon_out(rcon_enc));
  rcon #(.MODE(MODE_DEC)) dut_dec (.r_in, .inv_in, .rcon_out(rcon_dec));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] tab [10];
    tab[0] = 8'h01;
    for (int k = 1; k < 10; k++) tab[k] = ref_mul(tab[k-1], 8'h02);
    for (int m = 0; m < 2; m++)
      for (int r = 0; r < 10; r++) begin
        inv_in = m[0]; r_in = 4'(r); #1;
        checks++;
        if (rcon_out !== tab[m[0] ? 9 - r : r]) begin
          failures++;
          $display("FAIL: inv=%0d r_in=%0d rcon=%02x expected %02x", m, r, rcon_out, tab[m[0] ? 9 - r : r]);
        end
        checks++;
        if (rcon_enc !== tab[r]) begin
          failures++;
          $display("FAIL: enc-only inv=%0d r_in=%0d rcon=%02x expected %02x", m, r, rcon_enc, tab[r]);
        end
        checks++;
        if (rcon_dec !== tab[9 - r]) begin
          failures++;
          $display("FAIL: dec-only inv=%0d r_in=%0d rcon=%02x expected %02x", m, r, rcon_dec, tab[9 - r]);
        end
      end
    // the published constants of the last two rounds
    inv_in = 1'b0; r_in = 4'd8; #1; checks++; if (rcon_out != 8'h1B) failures++;
    inv_in = 1'b1; r_in = 4'd0; #1; checks++; if (rcon_out != 8'h36) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
