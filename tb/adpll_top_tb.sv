// adpll_top_tb: closed-loop test of the complete ADPLL at its reference
// setting: clk = K clock = ID clock = 10 MHz, N = 16 (n_ctrl = 2), K = 8
// (k_ctrl = 1), so fo = 312.5 kHz, hold range +-39.0625 kHz and frequency
// step 4.883 kHz. The reference v1 comes from a 32-bit phase accumulator
// clocked by clk, so any frequency can be set to within 0.003 Hz.
//
// A frequency counts as locked when, after a settling time, v1 and v2 show
// the same number of rising edges (+-1) over a 2 ms window, i.e. the phase
// error stays bounded. Checked:
//  - lock at fo and at offsets inside the hold range on both sides;
//  - no lock outside it;
//  - the edge of the lock range found by a 0.5 kHz sweep, and the hold range
//    found by a slow frequency ramp from lock, lie within 37 .. 41.1 kHz of
//    fo (calculated fo / K = 39.0625 kHz) above and below fo;
//  - the locked phase is about a quarter period (EXOR duty 35..65 %);
//  - lock-in time from reset at fo+20 kHz is under 1 ms, and the phase
//    jitter at fo is at most two correction steps (2 clocks = 22.5 deg);
//  - other settings: K = 16 halves the range; N = 8 doubles fo, and its hold
//    range (calculated fo / K = 78.125 kHz, the M = 16, N = 8, K = 8 setting)
//    lies within 60 .. 82.2 kHz: with only 16 clocks per output period one
//    correction is 22.5 degrees and the usable detector range shrinks;
//    the JK detector locks; k_ctrl = 0 leaves the oscillator free at fo.
// Mechanisms counted: pulse additions (inc), pulse removals (dec), K change,
// N change, detector switch, loop filter stopped, reset. Each must occur.
module adpll_top_tb;
  import adpll_pkg::*;
  localparam real FCLK = 10.0e6;

  logic clk = 0, rst;
  logic [KCTRL_W-1:0] k_ctrl;
  logic [NCTRL_W-1:0] n_ctrl;
  logic pd_sel, v1;
  logic v2, id_out, xor_out, jk_q, dn_up, carry, borrow, toggle_ff, inc, dec;
  int checks = 0, failures = 0;

  // mechanism counters
  longint n_inc = 0, n_dec = 0;
  int n_kchange = 0, n_nchange = 0, n_pdswitch = 0, n_freeze = 0, n_reset = 0;

  adpll_top dut (
    .clk(clk), .rst(rst), .k_ctrl(k_ctrl), .n_ctrl(n_ctrl), .pd_sel(pd_sel), .v1(v1),
    .v2(v2), .id_out(id_out), .xor_out(xor_out), .jk_q(jk_q), .dn_up(dn_up),
    .carry(carry), .borrow(borrow), .toggle_ff(toggle_ff), .inc(inc), .dec(dec));

  always #50 clk = ~clk;   // 10 MHz

  // reference generator
  logic [31:0] acc = 0, step = 0;
  always_ff @(posedge clk) acc <= acc + step;
  always_comb v1 = acc[31];

  always @(posedge clk) begin
    if (inc) n_inc++;
    if (dec) n_dec++;
  end

  initial begin : watchdog
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [31:0] step_for(input real f);
    return 32'($rtoi(f / FCLK * 4294967296.0 + 0.5));
  endfunction

  // Reset the loop, apply frequency f, settle, then observe a window.
  // diff:     v1 rising edges minus v2 rising edges in the window
  // duty:     EXOR output duty in percent over the window
  // lock_clk: lock-in time from reset in clocks: the last v1 edge during the
  //           settling time at which v2's lead (clocks from the last v2 rising
  //           edge to the v1 rising edge) was outside the range it keeps
  //           during the window, widened by one clock
  // jit:      peak-to-peak lead during the window, in clocks
  int jit, jk_duty, jk_hi;
  task automatic trial(input real f, input int settle, input int window,
                       output int diff, output int duty, output int lock_clk);
    int e1, e2, hi, t2, lead, lmin, lmax, nl;
    int lt[], lv[];
    logic p1, p2;
    lt = new[settle];
    lv = new[settle];
    step = step_for(f);
    rst = 1;
    n_reset++;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    jk_hi = 0;
    e1 = 0; e2 = 0; hi = 0; t2 = 0; nl = 0; lmin = 1 << 30; lmax = -1;
    p1 = v1; p2 = v2;
    for (int i = 0; i < settle + window; i++) begin
      @(posedge clk); #1;
      if (i == settle) begin e1 = 0; e2 = 0; hi = 0; end
      if (v2 && !p2) begin e2++; t2 = i; end
      if (v1 && !p1) begin
        e1++;
        lead = i - t2;
        if (i < settle) begin
          lt[nl] = i; lv[nl] = lead; nl++;
        end else begin
          if (lead < lmin) lmin = lead;
          if (lead > lmax) lmax = lead;
        end
      end
      if (xor_out) hi++;
      if (jk_q && i >= settle) jk_hi++;
      p1 = v1; p2 = v2;
    end
    lock_clk = 0;
    for (int i = 0; i < nl; i++)
      if (lv[i] < lmin - 1 || lv[i] > lmax + 1) lock_clk = lt[i];
    jit = lmax - lmin;
    diff = e1 - e2;
    duty = hi * 100 / window;
    jk_duty = jk_hi * 100 / window;
  endtask

  task automatic locked_at(input real f, output bit ok);
    int diff, duty, lc;
    trial(f, 20000, 20000, diff, duty, lc);
    ok = (diff >= -1 && diff <= 1);
  endtask

  localparam real FO = 312.5e3;

  // Lock at fc, then move the reference by dir * span over 40 ms. Returns
  // the offset at which v1 and v2 first drift more than two cycles apart
  // (the edge counts alone wander by one cycle as the locked phase moves).
  task automatic hold_ramp(input real fc, input real span, input int dir, output real edge_hz);
    int e1, e2, nramp;
    logic p1, p2;
    real fr;
    step = step_for(fc);
    rst = 1;
    n_reset++;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    repeat (5000) @(posedge clk);
    #1;
    e1 = 0; e2 = 0; p1 = v1; p2 = v2;
    edge_hz = span;
    nramp = 400000;
    for (int i = 0; i < nramp; i++) begin
      fr = fc + dir * span * i / nramp;
      step = step_for(fr);
      @(posedge clk); #1;
      if (v1 && !p1) e1++;
      if (v2 && !p2) e2++;
      p1 = v1; p2 = v2;
      if (e1 - e2 > 2 || e1 - e2 < -2) begin
        edge_hz = span * i / nramp;
        break;
      end
    end
  endtask
  int diff, duty, lc;
  real hi_edge, lo_edge, f;
  bit ok;

  initial begin
    k_ctrl = 1; n_ctrl = 2; pd_sel = 0; rst = 1;

    // centre frequency and offsets inside the hold range
    trial(FO, 20000, 20000, diff, duty, lc);
    $display("f=%0.1f kHz: edge diff %0d, EXOR duty %0d%%, lock-in %0d clocks, jitter %0d clocks p-p",
             FO / 1e3, diff, duty, lc, jit);
    // one correction moves v2 by one clock = 360/32 = 11.25 degrees
    check(jit <= 2, "phase jitter at fo at most two correction steps");
    check(diff >= -1 && diff <= 1, "lock at fo");
    check(duty >= 35 && duty <= 65, "quarter-period phase at fo");
    trial(FO + 20.0e3, 20000, 20000, diff, duty, lc);
    $display("f=%0.1f kHz: edge diff %0d, EXOR duty %0d%%, lock-in %0d clocks, jitter %0d clocks p-p",
             (FO + 20.0e3) / 1e3, diff, duty, lc, jit);
    check(diff >= -1 && diff <= 1, "lock at fo+20k");
    check(lc < 10000, "lock-in time under 1 ms at fo+20k");
    trial(FO - 20.0e3, 20000, 20000, diff, duty, lc);
    $display("f=%0.1f kHz: edge diff %0d, EXOR duty %0d%%", (FO - 20.0e3) / 1e3, diff, duty);
    check(diff >= -1 && diff <= 1, "lock at fo-20k");
    locked_at(FO + 35.0e3, ok); check(ok, "lock at fo+35k");
    locked_at(FO - 35.0e3, ok); check(ok, "lock at fo-35k");
    locked_at(FO + 50.0e3, ok); check(!ok, "no lock at fo+50k");
    locked_at(FO - 50.0e3, ok); check(!ok, "no lock at fo-50k");

    // lock range sweep
    hi_edge = 0.0;
    for (f = 30.0e3; f <= 48.0e3; f += 500.0)
      begin locked_at(FO + f, ok); if (ok) hi_edge = f; end
    lo_edge = 0.0;
    for (f = 30.0e3; f <= 48.0e3; f += 500.0)
      begin locked_at(FO - f, ok); if (ok) lo_edge = f; end
    $display("lock range: +%0.1f kHz / -%0.1f kHz (calculated 39.0625 kHz)",
             hi_edge / 1e3, lo_edge / 1e3);
    check(hi_edge > 37.0e3 && hi_edge < 41.1e3, "upper lock range");
    check(lo_edge > 37.0e3 && lo_edge < 41.1e3, "lower lock range");

    // hold range: ramp the reference slowly away from fo while locked and
    // note the frequency of the first cycle slip
    hold_ramp(FO, 50.0e3, 1, hi_edge);
    hold_ramp(FO, 50.0e3, -1, lo_edge);
    $display("hold range: +%0.2f kHz / -%0.2f kHz (calculated 39.0625 kHz)",
             hi_edge / 1e3, lo_edge / 1e3);
    check(hi_edge > 37.0e3 && hi_edge < 41.1e3, "upper hold range");
    check(lo_edge > 37.0e3 && lo_edge < 41.1e3, "lower hold range");

    // K = 16: range halves to 19.5 kHz
    k_ctrl = 2; n_kchange++;
    locked_at(FO + 15.0e3, ok); check(ok, "K=16 locks at fo+15k");
    locked_at(FO + 25.0e3, ok); check(!ok, "K=16 no lock at fo+25k");
    k_ctrl = 1; n_kchange++;

    // N = 8: fo doubles to 625 kHz, range fo/K = 78.1 kHz
    n_ctrl = 1; n_nchange++;
    locked_at(625.0e3 + 60.0e3, ok); check(ok, "N=8 locks at 685k");
    locked_at(625.0e3 + 100.0e3, ok); check(!ok, "N=8 no lock at 725k");
    // the maximum-frequency setting M = 16, N = 8, K = 8, at a 10 MHz clock:
    // hold range fo / K = 78.125 kHz around fo = 625 kHz
    hold_ramp(625.0e3, 100.0e3, 1, hi_edge);
    hold_ramp(625.0e3, 100.0e3, -1, lo_edge);
    $display("N=8 hold range: +%0.2f kHz / -%0.2f kHz (calculated 78.125 kHz)",
             hi_edge / 1e3, lo_edge / 1e3);
    check(hi_edge > 60.0e3 && hi_edge < 82.2e3, "N=8 upper hold range");
    check(lo_edge > 60.0e3 && lo_edge < 82.2e3, "N=8 lower hold range");
    n_ctrl = 2; n_nchange++;

    // JK detector
    pd_sel = 1; n_pdswitch++;
    trial(FO + 10.0e3, 20000, 20000, diff, duty, lc);
    $display("JK detector, f=%0.1f kHz: edge diff %0d, JK duty %0d%%, jitter %0d clocks p-p",
             (FO + 10.0e3) / 1e3, diff, jk_duty, jit);
    check(diff >= -1 && diff <= 1, "JK detector lock");
    check(jit <= 3, "JK detector lock is steady");
    pd_sel = 0; n_pdswitch++;

    // loop filter stopped: free running at fo whatever v1 does
    k_ctrl = 0; n_freeze++;
    trial(FO + 20.0e3, 100, 32000, diff, duty, lc);
    // v1 makes 332.5k*3.2ms = 1064 cycles, v2 312.5k*3.2ms = 1000
    $display("k_ctrl=0: edge diff %0d", diff);
    check(diff >= 62 && diff <= 66, "free-running oscillator at fo");
    k_ctrl = 1;

    $display("mechanisms: inc %0d dec %0d K-change %0d N-change %0d PD-switch %0d freeze %0d reset %0d",
             n_inc, n_dec, n_kchange, n_nchange, n_pdswitch, n_freeze, n_reset);
    check(n_inc > 0, "pulse addition occurred");
    check(n_dec > 0, "pulse removal occurred");
    check(n_kchange > 0 && n_nchange > 0 && n_pdswitch > 0 && n_freeze > 0 && n_reset > 0,
          "mode switches occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
