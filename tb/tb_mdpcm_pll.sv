// Self-checking test of the PLL model: from a 50 MHz reference it must lock
// within LOCK_CYCLES + 3 reference periods, give 500 MHz on clk_outT2 and
// clk_outR2 and 5 MHz on clk_outT1 and clk_outR1 by default, drop lock and
// hold its outputs low when the setting changes, and relock at the new
// frequency (here 50 * 5 / 3 MHz and 50 / 20 MHz). A zero factor never locks.
module tb_mdpcm_pll;
  import mdpcm_pkg::*;

  int checks = 0, failures = 0;
  logic clk_in = 0, rst_n = 0;
  pll_cfg_t cfg;
  logic clk_outT1, clk_outT2, clk_outR1, clk_outR2, locked;

  always #10ns clk_in = ~clk_in;

  mdpcm_pll dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // average period of a clock over n rising edges, in ns
  task automatic period_of(ref logic clk, input int n, output real p);
    realtime t0;
    @(posedge clk); t0 = $realtime;
    repeat (n) @(posedge clk);
    p = ($realtime - t0) / 1ns / real'(n);
  endtask

  function automatic bit near(real a, real b);
    return (a > b * 0.999) && (a < b * 1.001);
  endfunction

  initial begin
    real p;
    int n;
    cfg = DEF_PLL;
    #55ns rst_n = 1;
    n = 0;
    while (!locked && n < 100) begin @(posedge clk_in); n++; end
    check(locked && n <= 16 + 3, $sformatf("lock after %0d cycles", n));
    period_of(clk_outT2, 100, p); check(near(p, 2.0), $sformatf("T2 %f ns", p));
    period_of(clk_outR2, 100, p); check(near(p, 2.0), "R2 500 MHz");
    period_of(clk_outT1, 10, p);  check(near(p, 200.0), $sformatf("T1 %f ns", p));
    period_of(clk_outR1, 10, p);  check(near(p, 200.0), "R1 5 MHz");
    // new setting
    @(negedge clk_in);
    cfg = '{mul: 8'd5, div: 8'd3, ls_div: 8'd20};
    @(posedge clk_in); #1ns;
    check(!locked, "lock dropped");
    repeat (5) begin
      #0.7ns check(!clk_outT2 && !clk_outT1, "outputs low while unlocked");
    end
    wait (locked);
    period_of(clk_outT2, 100, p); check(near(p, 12.0), $sformatf("T2 %f ns", p));
    period_of(clk_outT1, 5, p);   check(near(p, 400.0), "T1 2.5 MHz");
    // zero factor
    cfg.mul = 0;
    repeat (40) @(posedge clk_in);
    check(!locked, "no lock with mul = 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
