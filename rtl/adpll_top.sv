// adpll_top: complete all-digital phase-locked loop.
//
// The loop locks the divided oscillator output v2 to the reference bit
// stream v1 in frequency and phase. Signal path:
//   v1 -> two-flop synchronizer -> phase detector -> DN/UP of the K counter
//   (loop filter) -> CARRY/BORROW -> ID counter (DCO) -> IDout ->
//   divide-by-N counter -> v2' -> back to the phase detector.
// pd_sel = 0 wires the EXOR detector to DN/UP (the standard connection);
// pd_sel = 1 wires the JK detector's Q-bar, whose sense makes that loop
// stable with J = v1 and K = v2'.
//
// With clk = 2N*fo the free-running output is fo = clk / (2N). One K period
// of the K counter spent entirely in one direction moves v2 by half an IDout
// cycle, giving
//   hold range          df_max = fo*M / (2*K*N)   (M = 2N, so fo / K)
//   frequency step      df     = 2*fo / (K*N)
// e.g. clk = 10 MHz, N = 16 (n_ctrl = 2), K = 8 (k_ctrl = 1): fo = 312.5 kHz,
// df_max = 39.0625 kHz, df = 4.883 kHz. In lock with the EXOR detector, v2
// leads v1 by about a quarter period.
//
// All state resets synchronously on rst (active high). k_ctrl, n_ctrl and
// pd_sel may change at any time; the loop re-acquires.
//
// The block structure and the formulas above follow the reference 74xx297
// loop. The single clock, the v1 synchronizer, the pd_sel switch (the part
// is rewired externally instead) and the observation outputs are this
// design's choices.
module adpll_top
  import adpll_pkg::*;
(
  input  logic               clk,      // K clock = ID clock = 2N*fo
  input  logic               rst,
  input  logic [KCTRL_W-1:0] k_ctrl,   // K = 2^(k_ctrl+2), 0 stops the loop filter
  input  logic [NCTRL_W-1:0] n_ctrl,   // N = 2^(n_ctrl+2)
  input  logic               pd_sel,   // 0: EXOR detector, 1: JK detector
  input  logic               v1,       // reference input, asynchronous
  output logic               v2,       // locked output v2'
  output logic               id_out,   // IDout
  output logic               xor_out,  // EXOR detector output
  output logic               jk_q,     // JK detector output
  output logic               dn_up,    // K counter direction in use
  output logic               carry,
  output logic               borrow,
  output logic               toggle_ff,
  output logic               inc,
  output logic               dec
);

  logic v1_s1, v1_s2;
  logic jk_q_n;
  logic v2p;

  always_ff @(posedge clk) begin
    if (rst) begin
      v1_s1 <= 1'b0;
      v1_s2 <= 1'b0;
    end else begin
      v1_s1 <= v1;
      v1_s2 <= v1_s1;
    end
  end

  always_comb dn_up = pd_sel ? jk_q_n : xor_out;

  adpll_297 u_core (
    .clk       (clk),
    .rst       (rst),
    .k_ctrl    (k_ctrl),
    .dn_up     (dn_up),
    .v1        (v1_s2),
    .v2p       (v2p),
    .xor_out   (xor_out),
    .jk_q      (jk_q),
    .jk_q_n    (jk_q_n),
    .carry     (carry),
    .borrow    (borrow),
    .id_out    (id_out),
    .toggle_ff (toggle_ff),
    .inc       (inc),
    .dec       (dec)
  );

  n_divider u_ndiv (
    .clk    (clk),
    .rst    (rst),
    .n_ctrl (n_ctrl),
    .cp     (id_out),
    .v2p    (v2p)
  );

  always_comb v2 = v2p;

endmodule
