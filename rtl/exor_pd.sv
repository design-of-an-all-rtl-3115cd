// exor_pd: exclusive-OR phase detector (gate G1 of the 74xx297).
//
// The output is high while the reference v1 and the divided oscillator
// signal v2' differ. With two square waves of equal frequency its duty cycle
// is proportional to the phase difference: 50 % at a quarter-period offset
// (the locked operating point), 0 % in phase, 100 % in antiphase. The output
// drives DN/UP of the K counter, so a duty above 50 % makes the loop slow the
// oscillator down and one below 50 % speeds it up.
//
// Purely combinational, no latency. The gate and its connection to DN/UP
// are those of the reference structure; synchronising the asynchronous input
// (see adpll_top) is left to the surrounding logic.
module exor_pd (
  input  logic v1,       // reference input
  input  logic v2p,      // divided oscillator output v2'
  output logic xor_out   // phase error
);

  always_comb xor_out = v1 ^ v2p;

endmodule
