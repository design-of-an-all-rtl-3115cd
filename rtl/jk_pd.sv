// jk_pd: edge-controlled phase detector (the JK flip-flop of the 74xx297).
//
// A rising edge on J (the reference v1) sets Q, a rising edge on K (v2')
// clears it; edges on both in the same cycle toggle Q, as a JK flip-flop
// does with J = K = 1. Q is therefore high from a reference edge to the next
// feedback edge, and its duty cycle measures the phase difference over a full
// period (50 % at half a period offset), unlike the EXOR detector whose range
// is half a period.
//
// The edges are detected synchronously: J and K are sampled every clk, and Q
// changes one clk after the sample that shows the edge. Which edge acts is
// this design's choice (rising); the part's datasheet is not followed in detail.
module jk_pd (
  input  logic clk,
  input  logic rst,   // synchronous, active high: Q = 0
  input  logic j,     // v1
  input  logic k,     // v2'
  output logic q,
  output logic q_n
);

  logic j_d, k_d;
  logic j_rise, k_rise;

  always_comb begin
    j_rise = j & ~j_d;
    k_rise = k & ~k_d;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      j_d <= 1'b0;
      k_d <= 1'b0;
      q   <= 1'b0;
    end else begin
      j_d <= j;
      k_d <= k;
      unique case ({j_rise, k_rise})
        2'b10:   q <= 1'b1;
        2'b01:   q <= 1'b0;
        2'b11:   q <= ~q;
        default: q <= q;
      endcase
    end
  end

  always_comb q_n = ~q;

endmodule
