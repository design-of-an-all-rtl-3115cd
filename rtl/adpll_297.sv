// adpll_297: the core of the ADPLL, equivalent to one 74xx297 device.
//
// It holds both phase detectors (the EXOR gate and the JK flip-flop), the K
// counter that filters the detector output and the ID counter that turns the
// filtered error into pulse insertions and removals on IDout. As on the
// device, the K counter's DN/UP is a pin of its own: the system wires one of
// the detector outputs to it (see adpll_top), and the divide-by-N counter
// that closes the loop is outside.
//
// The K clock and the ID clock are one clock, clk: every configuration of the
// reference design has M = 2N, so both run at the same frequency. All outputs
// except xor_out (combinational from v1/v2p) are flop outputs.
module adpll_297
  import adpll_pkg::*;
(
  input  logic               clk,      // K clock = ID clock
  input  logic               rst,      // synchronous, active high
  input  logic [KCTRL_W-1:0] k_ctrl,   // K modulus control
  input  logic               dn_up,    // K counter direction
  input  logic               v1,       // phase detector input (reference)
  input  logic               v2p,      // phase detector input (feedback v2')
  output logic               xor_out,  // EXOR detector output
  output logic               jk_q,     // JK detector Q
  output logic               jk_q_n,   // JK detector Q-bar
  output logic               carry,    // K counter CARRY
  output logic               borrow,   // K counter BORROW
  output logic               id_out,   // IDout
  output logic               toggle_ff,
  output logic               inc,
  output logic               dec
);

  exor_pd u_exor (
    .v1      (v1),
    .v2p     (v2p),
    .xor_out (xor_out)
  );

  jk_pd u_jk (
    .clk (clk),
    .rst (rst),
    .j   (v1),
    .k   (v2p),
    .q   (jk_q),
    .q_n (jk_q_n)
  );

  k_counter u_kcnt (
    .clk    (clk),
    .rst    (rst),
    .k_ctrl (k_ctrl),
    .dn_up  (dn_up),
    .carry  (carry),
    .borrow (borrow)
  );

  id_counter u_idcnt (
    .clk       (clk),
    .rst       (rst),
    .carry     (carry),
    .borrow    (borrow),
    .id_out    (id_out),
    .toggle_ff (toggle_ff),
    .inc       (inc),
    .dec       (dec)
  );

endmodule
