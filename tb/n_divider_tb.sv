// n_divider_tb: random count enables for every N setting; v2' must be high
// for the upper half of each N-count period (it rises after N/2 and falls
// after N counted pulses), independent of the gaps between pulses.
module n_divider_tb;
  import adpll_pkg::*;
  logic clk = 0, rst, cp, v2p;
  logic [NCTRL_W-1:0] n_ctrl;
  int checks = 0, failures = 0;

  n_divider dut (.clk(clk), .rst(rst), .n_ctrl(n_ctrl), .cp(cp), .v2p(v2p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int code = 0; code < 8; code++) begin
      int n, cnt, rises;
      logic prev;
      cnt = 0;
      rises = 0;
      n = 4 << code;
      n_ctrl = NCTRL_W'(code);
      rst = 1; cp = 0;
      @(posedge clk); #1 rst = 0;
      prev = v2p;
      for (int i = 0; i < 4 * n + 200; i++) begin
        cp = ($urandom_range(0, 2) != 0);
        @(posedge clk);
        if (cp) cnt++;
        #1;
        checks++;
        if (v2p !== ((cnt % n) >= n / 2)) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d count %0d v2p=%0d", n, cnt, v2p);
        end
        if (v2p && !prev) rises++;
        prev = v2p;
      end
      checks++;
      if (rises != (cnt + n / 2) / n) begin
        failures++;
        $display("FAIL N=%0d rises %0d for %0d pulses", n, rises, cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
