// exor_pd_tb: exhaustive check of the EXOR phase detector, plus a duty-cycle
// check: two square waves of period 32 offset by d samples must give an
// output high for 2*min(d, 32-d) of every 32 samples.
module exor_pd_tb;
  logic v1, v2p, xor_out;
  int checks = 0, failures = 0;

  exor_pd dut (.v1(v1), .v2p(v2p), .xor_out(xor_out));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2; b++) begin
        v1 = a[0]; v2p = b[0];
        #1;
        checks++;
        if (xor_out !== (a != b)) begin
          failures++;
          $display("FAIL v1=%0d v2p=%0d out=%0d", a, b, xor_out);
        end
      end
    for (int d = 0; d < 32; d++) begin
      int high;
      high = 0;
      for (int t = 0; t < 32; t++) begin
        v1  = ((t % 32) < 16);
        v2p = (((t + 32 - d) % 32) < 16);
        #1;
        if (xor_out) high++;
      end
      checks++;
      if (high != 2 * ((d < 16) ? d : 32 - d)) begin
        failures++;
        $display("FAIL offset %0d: high %0d", d, high);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
