// k_counter_tb: drives DN/UP at random for several K settings and checks that
// CARRY falls once every K up-clocks and BORROW once every K down-clocks
// (edge count = floor(clocks / K) exactly), that each output is high for the
// upper half of its count, and that k_ctrl = 0 freezes both.
module k_counter_tb;
  import adpll_pkg::*;
  logic clk = 0, rst, dn_up, carry, borrow;
  logic [KCTRL_W-1:0] k_ctrl;
  int checks = 0, failures = 0;

  k_counter dut (.clk(clk), .rst(rst), .k_ctrl(k_ctrl), .dn_up(dn_up),
                 .carry(carry), .borrow(borrow));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int code, input int cycles, input int up_pct);
    int ups = 0, dns = 0, cf = 0, bf = 0, kk;
    logic cp, bp;
    kk = 1 << (code + 2);
    k_ctrl = KCTRL_W'(code);
    rst = 1; dn_up = 0;
    @(posedge clk); #1 rst = 0;
    cp = carry; bp = borrow;
    for (int i = 0; i < cycles; i++) begin
      dn_up = ($urandom_range(0, 99) >= up_pct);
      @(posedge clk);
      if (code != 0) begin
        if (dn_up) dns++; else ups++;
      end
      #1;
      if (cp && !carry) cf++;
      if (bp && !borrow) bf++;
      cp = carry; bp = borrow;
      if (code != 0) begin
        checks++;
        if (carry !== ((ups % kk) >= kk / 2) || borrow !== ((dns % kk) >= kk / 2)) begin
          failures++;
          if (failures < 10) $display("FAIL K=%0d ups=%0d dns=%0d carry=%0d borrow=%0d",
                                      kk, ups, dns, carry, borrow);
        end
      end
    end
    checks++;
    if (code == 0) begin
      if (cf != 0 || bf != 0 || carry || borrow) begin
        failures++;
        $display("FAIL k_ctrl=0 did not freeze the counter");
      end
    end else if (cf != ups / kk || bf != dns / kk) begin
      failures++;
      $display("FAIL K=%0d carries %0d/%0d borrows %0d/%0d", kk, cf, ups / kk, bf, dns / kk);
    end
  endtask

  initial begin
    run(1, 3000, 50);
    run(1, 3000, 90);
    run(2, 3000, 20);
    run(3, 5000, 60);
    run(0, 500, 50);
    run(7, 20000, 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
