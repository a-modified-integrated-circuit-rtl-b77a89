// Self-checking test of the MDPCM modulator (latch, mapper, generator and
// controller together) with t_H0 = 6, t_L = 5, t_slot = 3 clk_outT2 periods
// and b = 5. A writer on clk_outT1 pushes random words; a monitor on tx_out
// measures each period between rising edges, turns it back into a message
// with its own decoder (period -> slot code -> binary or inverse gray) and
// compares it with the words written, in order. With the bus kept busy the
// symbols must follow back to back, with no gap, in both mappings. Holding
// the enable low must keep the line quiet, and an invalid b must be refused.
module tb_mdpcm_modulator;
  import mdpcm_pkg::*;

  localparam int H0 = 6, L = 5, S = 3, B = 5, M = 1 << B, BS = H0 + L;

  int checks = 0, failures = 0;
  logic clk_t1 = 0, clk_t2 = 0, rst_t1_n = 0, rst_t2_n = 0;
  logic data_valid = 0, data_ready;
  logic [MAX_B-1:0] data = '0;
  logic tx_out, en = 0, active, cfg_err, sent_tgl;
  mdpcm_cfg_t cfg_in;

  int words [$];
  int periods_ok = 0, gaps = 0, cyc = 0, last_rise = -1;
  logic prev = 0;

  always #20ns clk_t1 = ~clk_t1;
  always #5ns  clk_t2 = ~clk_t2;

  mdpcm_modulator dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int decode(int T, map_mode_e mode);
    int c, m;
    c = (T - BS) / S - 1;
    if (mode == MAP_BINARY) return c;
    m = 0;
    for (int i = B - 1; i >= 0; i--) m |= (((m >> (i + 1)) ^ (c >> i)) & 1) << i;
    return m;
  endfunction

  always @(negedge clk_t2) begin
    cyc++;
    if (tx_out && !prev) begin
      if (last_rise >= 0) begin
        int T;
        T = cyc - last_rise;
        if (T >= BS + (M + 2) * S) gaps++;
        else begin
          check((T - BS) % S == 0 && T > BS && T <= BS + M * S, $sformatf("period %0d", T));
          check(words.size() > 0, "symbol with no word");
          if (words.size() > 0) check(decode(T, cfg_in.mode) == words.pop_front(), "message");
          periods_ok++;
        end
      end
      last_rise = cyc;
    end
    prev = tx_out;
  end

  task automatic push(int w);
    @(negedge clk_t1);
    data_valid = 1; data = MAX_B'(w) | (MAX_B'($urandom) << B);
    do @(posedge clk_t1); while (!data_ready);
    words.push_back(w);
    #1ns data_valid = 0;
  endtask

  task automatic burst(map_mode_e mode, int n, int gaps_expected);
    int g0;
    cfg_in = '{mode: mode, bits: B, t_h0: H0, t_l: L, t_slot: S};
    en = 1;
    g0 = gaps;
    push(0); push(M - 1);
    for (int i = 0; i < n; i++) push($urandom % M);
    wait (words.size() == 0);
    en = 0;
    wait (!active);
    check(gaps == g0 + gaps_expected, "no gap inside a burst");
    repeat (5) @(negedge clk_t2);
  endtask

  initial begin
    repeat (3) @(negedge clk_t1);
    rst_t1_n = 1; rst_t2_n = 1;
    burst(MAP_BINARY, 40, 0);
    burst(MAP_GRAY, 40, 1);  // one gap: since the end of the first burst
    check(periods_ok == 84, $sformatf("%0d symbols", periods_ok));
    // disabled: nothing goes out
    begin
    int r0;
    r0 = last_rise;
    cfg_in.bits = 4'd15;
    en = 1;
    @(negedge clk_t1);
    data_valid = 1; data = 14'd3;
    repeat (20) @(negedge clk_t1);
    check(cfg_err && !active, "b = 15 refused");
    check(!tx_out && last_rise == r0, "line quiet");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
