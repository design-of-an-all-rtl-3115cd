// n_divider: the divide-by-N counter in the feedback path of the ADPLL.
//
// A binary counter advances in every clock cycle in which its count input CP
// (IDout) is high. v2' is the counter bit whose period is N counts, a square
// wave of 50 % duty at f(IDout) / N, which returns to the phase detector.
// N = 2^(n_ctrl+2) (4 .. 512, see adpll_pkg).
//
// CP is used as a clock enable on the common clock rather than as a clock of
// its own, so two adjacent IDout pulses count twice. v2' is a flop bit and
// changes one clock after the CP cycle that moves it. The power-of-two N
// encoding, the 50 % duty and the synchronous reset are this design's choices.
module n_divider
  import adpll_pkg::*;
(
  input  logic               clk,
  input  logic               rst,     // synchronous, active high
  input  logic [NCTRL_W-1:0] n_ctrl,  // N control
  input  logic               cp,      // count enable (IDout)
  output logic               v2p      // v2'
);

  logic [NCNT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst)     cnt <= '0;
    else if (cp) cnt <= cnt + 1'b1;
  end

  always_comb v2p = cnt[n_msb(n_ctrl)];

endmodule
