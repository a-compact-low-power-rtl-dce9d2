// aes_ctrl: sequencer of the 8-bit AES core.
//
// A start_in pulse while idle latches inv_in and runs an 8-bit counter from 0 to
// ROUND_CLKS*NR_ROUNDS + DRAIN_CLKS - 1 (0..163). Counts 0..159 are the round clocks: round
// index rnd = count/16 (0..9), byte step = count%16; col_last marks the fourth byte of each
// column. Counts 160..163 drain the last column out of the parallel-to-serial converters.
// busy_out is high for the whole run. comp rises when the run ends (the result can be
// unloaded and new data loaded) and falls at the next load_in or start_in.
// The 160 round clocks follow the core; the 4 drain clocks, the level-type busy_out/comp
// and ignoring start_in while busy are this design's choices.
// Lint note: Verilator reports rst_n as both synchronous and asynchronous. That comes from the
// disable iff (!rst_n) of the protocol assertions at the end; the registers use only the
// asynchronous reset.
module aes_ctrl
  import aes_pkg::*;
#(
  parameter int unsigned DRAIN_CLKS = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_in,
  input  logic       load_in,
  input  logic       inv_in,
  output logic       running,      // any of the 164 clocks of a run
  output logic       lookup,       // a round clock (0..159)
  output logic [3:0] rnd,
  output logic [3:0] step,
  output logic       first_round,
  output logic       last_round,
  output logic       col_last,
  output logic       mode_inv,
  output logic       busy_out,
  output logic       comp
);
  localparam int unsigned RUN_CLKS = ROUND_CLKS * NR_ROUNDS;   // 160
  localparam int unsigned END_CNT  = RUN_CLKS + DRAIN_CLKS - 1;

  logic [7:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      cnt      <= '0;
      mode_inv <= 1'b0;
      comp     <= 1'b0;
    end else if (running) begin
      if (cnt == 8'(END_CNT)) begin
        running <= 1'b0;
        cnt     <= '0;
        comp    <= 1'b1;
      end else begin
        cnt <= cnt + 8'd1;
      end
    end else if (start_in) begin
      running  <= 1'b1;
      cnt      <= '0;
      mode_inv <= inv_in;
      comp     <= 1'b0;
    end else if (load_in) begin
      comp <= 1'b0;
    end
  end

  always_comb begin
    lookup      = running && (cnt < 8'(RUN_CLKS));
    rnd         = cnt[7:4];
    step        = cnt[3:0];
    first_round = (rnd == 4'd0);
    last_round  = (rnd == 4'(NR_ROUNDS - 1));
    col_last    = lookup && (cnt[1:0] == 2'd3);
    busy_out    = running;
  end

  // Protocol rules: a start pulse while idle begins a run at count 0; comp and busy_out are
  // never high together; a run ends with comp.
  a_start: assert property (@(posedge clk) disable iff (!rst_n)
                            (!running && start_in) |=> (running && cnt == 8'd0));
  a_excl:  assert property (@(posedge clk) disable iff (!rst_n) !(busy_out && comp));
  a_done:  assert property (@(posedge clk) disable iff (!rst_n)
                            (running && cnt == 8'(END_CNT)) |=> (!running && comp));
endmodule
