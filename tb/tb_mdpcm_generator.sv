// Self-checking test of the MDPCM generator with small durations
// (t_H0 = 5, t_L = 4, t_slot = 3 clock periods, b = 4). A monitor records
// the rising edges and high times of tx_out. Every high time must be t_H0;
// every period between rising edges must either be exactly
// t_H0 + t_L + (c+1)*t_slot for the next code sent, in order, or be a burst
// gap of at least t_H0 + t_L + (M+2)*t_slot. Covered: a back-to-back burst,
// a code arriving during the closing pulse (it must continue the burst),
// and run held low (nothing may be sent).
module tb_mdpcm_generator;
  import mdpcm_pkg::*;

  localparam int H0 = 5, L = 4, S = 3, B = 4, M = 1 << B;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0;
  mdpcm_cfg_t cfg;
  logic code_valid, code_ready, tx_out, sent, busy;
  logic [MAX_B-1:0] code;
  logic [MAX_B-1:0] drv_q [$];   // codes still to offer
  int exp_codes [$];             // codes in the order they were taken
  int periods [$];
  int cyc = 0, last_rise = -1, high_len = 0, n_sent = 0;
  logic prev = 0;

  always #5ns clk = ~clk;

  mdpcm_generator dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver: offer the head of drv_q
  always @(negedge clk) begin
    code_valid = drv_q.size() > 0;
    code = code_valid ? drv_q[0] : '0;
  end
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (code_valid && code_ready) begin
      exp_codes.push_back(int'(code));
      void'(drv_q.pop_front());
    end
    if (sent) n_sent <= n_sent + 1;
  end
  // monitor
  always @(negedge clk) begin
    if (tx_out && !prev) begin
      if (last_rise >= 0) periods.push_back(cyc - last_rise);
      last_rise = cyc;
      high_len = 0;
    end
    if (tx_out) high_len++;
    if (!tx_out && prev) check(high_len == H0, "high time");
    prev = tx_out;
  end

  initial begin
    int k, gaps;
    cfg = '{mode: MAP_BINARY, bits: B, t_h0: H0, t_l: L, t_slot: S};
    repeat (3) @(posedge clk);
    rst_n = 1;
    run = 1;
    // burst A: ten codes back to back, including both extremes
    drv_q.push_back(0);
    drv_q.push_back(M - 1);
    for (int i = 0; i < 8; i++) drv_q.push_back(MAX_B'($urandom % M));
    wait (drv_q.size() == 0);
    wait (!busy);
    repeat (20) @(posedge clk);
    // burst B: three codes, then one more offered during the closing pulse
    for (int i = 0; i < 3; i++) drv_q.push_back(MAX_B'($urandom % M));
    wait (n_sent == 13);
    @(negedge clk);
    wait (tx_out);
    repeat (2) @(negedge clk);
    drv_q.push_back(MAX_B'(7));
    wait (!busy);
    // run low: a waiting code must not be sent
    run = 0;
    drv_q.push_back(MAX_B'(11));
    repeat (200) @(negedge clk);
    check(!busy && !tx_out && drv_q.size() == 1, "held while run is low");
    run = 1;
    wait (n_sent == 15);
    wait (!busy);
    repeat (10) @(posedge clk);
    // judge the recorded periods
    k = 0; gaps = 0;
    foreach (periods[i]) begin
      if (k < exp_codes.size() && periods[i] == H0 + L + (exp_codes[k] + 1) * S) begin
        k++;
        check(1, "period");
      end else if (periods[i] >= H0 + L + (M + 2) * S) begin
        gaps++;
        check(1, "gap");
      end else begin
        check(0, $sformatf("period %0d", periods[i]));
      end
    end
    check(k == 15 && exp_codes.size() == 15, "all codes sent in order");
    check(gaps == 2, "burst gaps");
    check(n_sent == 15, "sent pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
