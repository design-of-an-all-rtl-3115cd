// adpll_pkg: constants and modulus decoding shared by the ADPLL blocks.
//
// The loop is the classic 74xx297 arrangement: phase detector, K counter
// (loop filter), ID counter (digitally controlled oscillator) and a divide-by-N
// counter in the feedback path. Both moduli are powers of two and are set by
// small control codes:
//   K = 2^(k_ctrl+2) for k_ctrl = 1..15 (8 .. 131072); k_ctrl = 0 stops the K counter.
//   N = 2^(n_ctrl+2) for n_ctrl = 0..7  (4 .. 512).
// The K encoding is the one of the 74xx297 part; applying the same rule to the
// N code is this design's choice (code 1 gives the K = 8 and code 2 the N = 16
// of the reference configuration).
package adpll_pkg;

  localparam int unsigned KCTRL_W = 4;   // width of the K modulus control
  localparam int unsigned NCTRL_W = 3;   // width of the N control
  localparam int unsigned KCNT_W  = 17;  // K counter width: largest K is 2^17
  localparam int unsigned NCNT_W  = 9;   // divider width: largest N is 2^9

  // Index of the counter bit whose period is K counts (the counter MSB for modulus K).
  function automatic int unsigned k_msb(input logic [KCTRL_W-1:0] code);
    return int'(code) + 1;
  endfunction

  // Index of the divider bit whose period is N counts.
  function automatic int unsigned n_msb(input logic [NCTRL_W-1:0] code);
    return int'(code) + 1;
  endfunction

  // Modulus values, used by testbenches to compute expected behaviour.
  function automatic int unsigned k_of(input logic [KCTRL_W-1:0] code);
    return (code == '0) ? 0 : (32'd1 << (int'(code) + 2));
  endfunction

  function automatic int unsigned n_of(input logic [NCTRL_W-1:0] code);
    return 32'd1 << (int'(code) + 2);
  endfunction

endpackage
