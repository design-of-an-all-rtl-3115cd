// k_counter: the loop filter of the ADPLL (K counter of the 74xx297).
//
// Two binary counters share the K clock. The "up" counter advances on every
// clock while DN/UP is low, the "down" counter on every clock while DN/UP is
// high. CARRY is the bit of the up counter whose period is K counts, BORROW
// the same bit of the down counter, so each output completes one period (one
// falling edge) every K clocks spent in its direction. The ID counter turns
// those falling edges into pulse insertions (CARRY) or removals (BORROW).
// Over a long time the difference between the two edge rates equals
// (1 - 2*duty(DN/UP)) * f_clk / K, which is the filtered phase error.
//
// K = 2^(k_ctrl+2); k_ctrl = 0 freezes both counters (see adpll_pkg). The
// outputs are flop bits, one clock after the DN/UP sample that moves them.
// Using two counters and taking the outputs as counter MSBs follows the
// 74xx297; the synchronous reset to zero is this design's choice.
module k_counter
  import adpll_pkg::*;
(
  input  logic               clk,     // K clock, M*fo
  input  logic               rst,     // synchronous, active high
  input  logic [KCTRL_W-1:0] k_ctrl,  // K modulus control
  input  logic               dn_up,   // 1: count towards BORROW, 0: towards CARRY
  output logic               carry,
  output logic               borrow
);

  logic [KCNT_W-1:0] up_cnt, dn_cnt;
  logic              run;

  always_comb run = (k_ctrl != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      up_cnt <= '0;
      dn_cnt <= '0;
    end else if (run) begin
      if (dn_up) dn_cnt <= dn_cnt + 1'b1;
      else       up_cnt <= up_cnt + 1'b1;
    end
  end

  always_comb begin
    carry  = up_cnt[k_msb(k_ctrl)];
    borrow = dn_cnt[k_msb(k_ctrl)];
  end

endmodule
