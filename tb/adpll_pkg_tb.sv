// adpll_pkg_tb: checks the modulus decoding of the shared package against
// the expected values: K code 1 -> 8, 2 -> 16, ..., 15 -> 131072, 0 -> off;
// N code 0 -> 4, 2 -> 16, 7 -> 512; and that the counter bit chosen for each
// modulus has a period of exactly that many counts (bit i has period 2^(i+1)).
module adpll_pkg_tb;
  import adpll_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int kexp;
    check(k_of(4'd0) == 0, "K code 0 stops the counter");
    check(k_of(4'd1) == 8, "K code 1 is K = 8");
    check(k_of(4'd15) == 131072, "K code 15 is K = 131072");
    kexp = 8;
    for (int c = 1; c < 16; c++) begin
      check(k_of(KCTRL_W'(c)) == kexp, $sformatf("K code %0d", c));
      check((2 << k_msb(KCTRL_W'(c))) == kexp, $sformatf("K bit for code %0d", c));
      check(k_msb(KCTRL_W'(c)) < KCNT_W, "K bit inside the counter");
      kexp *= 2;
    end
    check(n_of(3'd0) == 4, "N code 0 is N = 4");
    check(n_of(3'd2) == 16, "N code 2 is N = 16");
    check(n_of(3'd7) == 512, "N code 7 is N = 512");
    for (int c = 0; c < 8; c++) begin
      check((2 << n_msb(NCTRL_W'(c))) == n_of(NCTRL_W'(c)), $sformatf("N bit for code %0d", c));
      check(n_msb(NCTRL_W'(c)) < NCNT_W, "N bit inside the counter");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
