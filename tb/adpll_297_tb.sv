// adpll_297_tb: open-loop test of the 74xx297-equivalent core. DN/UP is
// wired to the EXOR output as in the standard connection, and the phase
// detector inputs are held so that the detector output is constant:
//  - inputs equal: EXOR low, the core must add one IDout pulse every K clocks
//    (inc rate f_clk / K) and IDout must carry (C + incs) / 2 pulses in C clocks;
//  - inputs different: EXOR high, one pulse removed every K clocks;
//  - for K = 8, 16 and 32.
// It also checks the JK detector outputs after edges on v1 and v2'.
module adpll_297_tb;
  import adpll_pkg::*;
  logic clk = 0, rst;
  logic [KCTRL_W-1:0] k_ctrl;
  logic v1, v2p, xor_out, jk_q, jk_q_n, carry, borrow, id_out, toggle_ff, inc, dec;
  int checks = 0, failures = 0;

  adpll_297 dut (
    .clk(clk), .rst(rst), .k_ctrl(k_ctrl), .dn_up(xor_out), .v1(v1), .v2p(v2p),
    .xor_out(xor_out), .jk_q(jk_q), .jk_q_n(jk_q_n), .carry(carry), .borrow(borrow),
    .id_out(id_out), .toggle_ff(toggle_ff), .inc(inc), .dec(dec));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  task automatic run(input int code, input bit differ, input int cycles);
    int kk, ni, nd, hi;
    kk = 1 << (code + 2);
    ni = 0; nd = 0; hi = 0;
    k_ctrl = KCTRL_W'(code);
    v1 = differ; v2p = 0;
    rst = 1;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < cycles; i++) begin
      @(posedge clk); #1;
      if (inc) ni++;
      if (dec) nd++;
      if (id_out) hi++;
    end
    $display("K=%0d differ=%0d: %0d clocks, %0d incs, %0d decs, %0d pulses",
             kk, differ, cycles, ni, nd, hi);
    check(xor_out == differ, "EXOR output");
    if (differ) begin
      check(ni == 0, "no increments while EXOR is high");
      check(nd >= cycles / kk - 1 && nd <= cycles / kk, "decrement rate f_clk/K");
      check(hi >= (cycles - nd) / 2 - 1 && hi <= (cycles - nd) / 2 + 1, "pulses removed");
    end else begin
      check(nd == 0, "no decrements while EXOR is low");
      check(ni >= cycles / kk - 1 && ni <= cycles / kk, "increment rate f_clk/K");
      check(hi >= (cycles + ni) / 2 - 1 && hi <= (cycles + ni) / 2 + 1, "pulses added");
    end
  endtask

  initial begin
    run(1, 0, 800);
    run(1, 1, 800);
    run(2, 0, 1600);
    run(2, 1, 1600);
    run(3, 1, 3200);
    // JK detector: v1 rising sets, v2' rising clears
    rst = 1; v1 = 0; v2p = 0;
    @(posedge clk); #1 rst = 0;
    @(negedge clk) v1 = 1;
    @(posedge clk); #1;
    check(jk_q && !jk_q_n, "JK set by v1 edge");
    @(negedge clk) v2p = 1;
    @(posedge clk); #1;
    check(!jk_q && jk_q_n, "JK cleared by v2' edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
