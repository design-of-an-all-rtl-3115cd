// id_counter: increment/decrement counter, the digitally controlled
// oscillator of the ADPLL (ID counter of the 74xx297).
//
// A toggle flip-flop changes state on every ID clock. IDout is high for the
// whole clock cycle in which the toggle flip-flop is 0, so with no corrections
// IDout carries one pulse every second clock (f_clk / 2). A correction holds
// the toggle flip-flop for one clock instead of letting it toggle:
//   increment: held at 0, so the next cycle is a pulse as well (a pulse is
//              added; the pulse train advances by half an IDout cycle);
//   decrement: held at 1, so the next cycle has no pulse (a pulse is removed;
//              the train is delayed by half an IDout cycle).
// An added pulse is adjacent to the previous one, so IDout is then high for
// two clocks; whoever counts IDout must count cycles in which it is high, not
// its edges.
//
// Requests come from the K counter as falling edges of CARRY (increment) and
// BORROW (decrement). A request waits until the toggle flip-flop is in the
// state in which it can act (0 for an increment, 1 for a decrement); at most
// one waits per direction, and an increment and a decrement waiting together
// cancel. inc/dec are one-clock strobes marking the clock in which a
// correction is applied. The edge choice, the waiting and the cancelling are
// this design's choices; the half-cycle step is what the lock-range formula of
// the loop (df_max = fo*M/(2*K*N)) requires.
module id_counter (
  input  logic clk,        // ID clock, 2N*fo
  input  logic rst,        // synchronous, active high
  input  logic carry,      // from the K counter
  input  logic borrow,     // from the K counter
  output logic id_out,     // IDout pulse slots
  output logic toggle_ff,  // internal toggle flip-flop
  output logic inc,        // increment applied this clock
  output logic dec         // decrement applied this clock
);

  logic carry_d, borrow_d;
  logic pend_inc, pend_dec;
  logic want_inc, want_dec;
  logic do_inc, do_dec;

  always_comb begin
    want_inc = pend_inc | (carry_d & ~carry);
    want_dec = pend_dec | (borrow_d & ~borrow);
    do_inc   = want_inc & ~want_dec & ~toggle_ff;
    do_dec   = want_dec & ~want_inc &  toggle_ff;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      carry_d   <= 1'b0;
      borrow_d  <= 1'b0;
      pend_inc  <= 1'b0;
      pend_dec  <= 1'b0;
      toggle_ff <= 1'b0;
      inc       <= 1'b0;
      dec       <= 1'b0;
    end else begin
      carry_d  <= carry;
      borrow_d <= borrow;
      inc      <= do_inc;
      dec      <= do_dec;
      if (want_inc && want_dec) begin
        // opposite requests cancel
        pend_inc  <= 1'b0;
        pend_dec  <= 1'b0;
        toggle_ff <= ~toggle_ff;
      end else if (do_inc) begin
        pend_inc  <= 1'b0;
        toggle_ff <= 1'b0;
      end else if (do_dec) begin
        pend_dec  <= 1'b0;
        toggle_ff <= 1'b1;
      end else begin
        pend_inc  <= want_inc;
        pend_dec  <= want_dec;
        toggle_ff <= ~toggle_ff;
      end
    end
  end

  always_comb id_out = ~toggle_ff;

  // at most one correction per clock, and each leaves its mark on IDout
  a_one_correction: assert property (@(posedge clk) disable iff (rst) !(inc && dec));
  a_inc_holds_low:  assert property (@(posedge clk) disable iff (rst) inc |-> !toggle_ff);
  a_dec_holds_high: assert property (@(posedge clk) disable iff (rst) dec |-> toggle_ff);

endmodule
