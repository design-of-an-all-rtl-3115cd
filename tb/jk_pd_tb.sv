// jk_pd_tb: random J/K waveforms against a reference model of the
// edge-controlled detector (rising J sets, rising K clears, both toggle, one
// clock of latency), then a duty-cycle check with two square waves of period
// 40 where K lags J by d clocks: Q must be high for d of every 40 clocks.
module jk_pd_tb;
  logic clk = 0, rst, j, k, q, q_n;
  int checks = 0, failures = 0;
  logic jp, kp, qm;

  jk_pd dut (.clk(clk), .rst(rst), .j(j), .k(k), .q(q), .q_n(q_n));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; j = 0; k = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    jp = 0; kp = 0; qm = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (i % 3 == 0) begin
        j = 1'($urandom_range(0, 1));
        k = 1'($urandom_range(0, 1));
      end
      @(posedge clk);
      // model: evaluate the edge seen at this clock
      if (j && !jp && k && !kp) qm = ~qm;
      else if (j && !jp)        qm = 1;
      else if (k && !kp)        qm = 0;
      jp = j; kp = k;
      #1;
      checks++;
      if (q !== qm || q_n !== ~qm) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: q=%0d model=%0d", i, q, qm);
      end
    end
    for (int d = 1; d < 40; d += 7) begin
      int high;
      high = 0;
      for (int t = 0; t < 400; t++) begin
        @(negedge clk);
        j = ((t % 40) < 20);
        k = (((t + 40 - d) % 40) < 20);
        if (t >= 80 && q) high++;
      end
      checks++;
      if (high != d * 8) begin
        failures++;
        $display("FAIL lag %0d: high %0d expected %0d", d, high, d * 8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
