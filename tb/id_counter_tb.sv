// id_counter_tb: drives CARRY and BORROW as square waves (like K counter
// outputs) and checks the ID counter:
//  - with no requests IDout alternates every clock (f_clk / 2);
//  - each CARRY falling edge yields exactly one inc strobe within 2 clocks,
//    each BORROW falling edge one dec strobe within 2 clocks, except that an
//    increment and a decrement outstanding together cancel;
//  - IDout stays high two clocks running exactly when inc is strobed
//    (pulse added) and low two clocks running exactly when dec is strobed
//    (pulse removed);
//  - pulse bookkeeping: high cycles - low cycles = incs - decs (+0/+1).
module id_counter_tb;
  logic clk = 0, rst, carry, borrow, id_out, toggle_ff, inc, dec;
  int checks = 0, failures = 0;

  id_counter dut (.clk(clk), .rst(rst), .carry(carry), .borrow(borrow),
                  .id_out(id_out), .toggle_ff(toggle_ff), .inc(inc), .dec(dec));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cf = 0, bf = 0, ni = 0, nd = 0, xc = 0, hi = 0, lo = 0;
  int c_age = 0, b_age = 0;   // clocks a request has been waiting
  logic prev_out, cprev, bprev;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // segment: cnt_c / cnt_b advance when the respective enable is set,
  // carry/borrow are bit 2 of the counters (K = 8)
  int cc = 0, bc = 0;
  task automatic segment(input int cycles, input int pc, input int pb);
    for (int i = 0; i < cycles; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 99) < pc) cc++;
      else if ($urandom_range(0, 99) < pb) bc++;
      carry  = cc[2];
      borrow = bc[2];
    end
  endtask

  initial begin
    rst = 1; carry = 0; borrow = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    fork
      begin
        segment(400, 0, 0);     // free running
        segment(2000, 100, 0);  // carry only, fastest rate
        segment(2000, 0, 100);  // borrow only
        segment(4000, 50, 50);  // mixed
        segment(50, 0, 0);
      end
      begin : monitor
        @(posedge clk);
        #1;
        prev_out = id_out; cprev = carry; bprev = borrow;
        forever begin
          @(posedge clk);
          #1;
          if (id_out) hi++; else lo++;
          if (inc) ni++;
          if (dec) nd++;
          if (cprev && !carry) begin cf++; end
          if (bprev && !borrow) begin bf++; end
          check((id_out == prev_out && id_out) == inc, "added pulse vs inc");
          check((id_out == prev_out && !id_out) == dec, "removed pulse vs dec");
          // opposite requests outstanding together cancel inside the DUT
          if (cf > ni + xc && bf > nd + xc) xc++;
          check(cf - ni - xc >= 0 && cf - ni - xc <= 1, "inc count follows carry edges");
          check(bf - nd - xc >= 0 && bf - nd - xc <= 1, "dec count follows borrow edges");
          c_age = (cf > ni + xc) ? c_age + 1 : 0;
          b_age = (bf > nd + xc) ? b_age + 1 : 0;
          check(c_age <= 2 && b_age <= 2, "correction latency <= 2 clocks");
          prev_out = id_out; cprev = carry; bprev = borrow;
        end
      end
    join_any
    repeat (4) @(posedge clk);
    #2;
    check(cf == ni + xc && bf == nd + xc, "all requests served");
    check(ni > 100 && nd > 100, "both corrections exercised");
    check((hi - lo) - (ni - nd) >= -1 && (hi - lo) - (ni - nd) <= 1, "pulse bookkeeping");
    $display("carry edges %0d incs %0d borrow edges %0d decs %0d cancelled %0d high %0d low %0d",
             cf, ni, bf, nd, xc, hi, lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
