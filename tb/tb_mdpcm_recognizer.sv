// Self-checking test of the MDPCM recognizer with t_H0 = 5, t_L = 4,
// t_slot = 3 clock periods and b = 4 (M = 16). The bench drives pulse trains
// and computes the expected code of each period itself, from the nearest
// nominal period t_BS + (c+1)*t_slot (shorter periods give 0, periods of
// t_BS + (M+1/2)*t_slot or more give nothing). Covered: every code at its
// nominal period and one clock early or late, periods just past a decision
// boundary, periods shorter than t_BS, over-long periods, an idle line (the
// recognizer must report the burst end and ignore the next first edge), run
// held low, and a train whose edges fall at random points between clock
// edges (asynchronous sampling). The latency from the closing rising edge to
// code_valid is checked as well.
module tb_mdpcm_recognizer;
  import mdpcm_pkg::*;

  localparam int H0 = 5, L = 4, S = 3, B = 4, M = 1 << B, BS = H0 + L;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0, rx_in = 0;
  mdpcm_cfg_t cfg;
  logic code_valid, burst_end, active;
  logic [MAX_B-1:0] code;
  int exp_q [$];
  int n_end = 0, cyc = 0, edge_cyc = 0, lat = -1;

  always #5ns clk = ~clk;

  mdpcm_recognizer dut (.*);

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

  // expected code of a period of T clocks, -1 for none
  function automatic int expect_code(int T);
    real x = (real'(T) - real'(BS)) / real'(S);
    if (x >= real'(M) + 0.5) return -1;
    if (x < 1.5) return 0;
    return int'($floor(x + 0.5)) - 1;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && code_valid) begin
      if (lat < 0) lat = cyc - edge_cyc;
      check(exp_q.size() > 0, "unexpected code");
      if (exp_q.size() > 0) begin
        int e;
        e = exp_q.pop_front();
        check(int'(code) == e, $sformatf("code %0d expected %0d", code, e));
      end
    end
    if (rst_n && burst_end) n_end <= n_end + 1;
  end

  // one period of T clocks, clock-synchronous, starting with a rising edge
  task automatic period(int T, bit first);
    @(negedge clk);
    rx_in = 1;
    if (!first) begin
      int e;
      e = expect_code(T_prev);
      if (e >= 0) exp_q.push_back(e);
    end
    edge_cyc = cyc;
    repeat (H0) @(negedge clk);
    rx_in = 0;
    repeat (T - H0 - 1) @(negedge clk);
    T_prev = T;
  endtask
  int T_prev = 0;

  task automatic close_burst();
    int e;
    @(negedge clk);
    rx_in = 1;
    e = expect_code(T_prev);
    if (e >= 0) exp_q.push_back(e);
    repeat (H0) @(negedge clk);
    rx_in = 0;
    repeat (BS + (M + 3) * S) @(negedge clk);
  endtask

  initial begin
    int ends0;
    cfg = '{mode: MAP_BINARY, bits: B, t_h0: H0, t_l: L, t_slot: S};
    repeat (3) @(posedge clk);
    rst_n = 1;
    run = 1;
    repeat (5) @(posedge clk);
    // every code, nominal and +-1 clock
    for (int d = -1; d <= 1; d++) begin
      period(BS + S, 1);
      for (int c = 0; c < M; c++) period(BS + (c + 1) * S + d, 0);
      ends0 = n_end;
      close_burst();
      check(n_end == ends0 + 1, "burst end reported");
      check(!active, "idle after burst");
    end
    check(lat == 3, $sformatf("latency %0d", lat));
    // near the boundaries, short and over-long periods
    period(BS + S, 1);
    period(BS + S + 2, 0);              // nearer to code 1
    period(BS + 2 * S - 2, 0);          // nearer to code 0
    period(H0 + 1, 0);                  // shorter than t_BS: code 0
    period(BS + M * S + 1, 0);          // still the last code
    period(BS + M * S + 2, 0);          // past the last boundary: none
    period(BS + 5 * S, 0);
    close_burst();
    // run low: no code
    run = 0;
    period(BS + S, 1);
    period(BS + 2 * S, 1);
    period(BS + 3 * S, 1);
    check(exp_q.size() == 0 && !active, "ignored while run is low");
    run = 1;
    repeat (3) @(negedge clk);
    // edges at random points between clock edges
    begin
      int codes [$];
      realtime t0;
      for (int i = 0; i < 40; i++) codes.push_back($urandom % M);
      #(3.7ns);
      rx_in = 1; #(real'(H0) * 10ns); rx_in = 0;
      #(real'(BS - H0 + S) * 10ns);
      foreach (codes[i]) begin
        t0 = $realtime;
        rx_in = 1;
        exp_q.push_back(i > 0 ? codes[i - 1] : 0);
        #(real'(H0) * 10ns);
        rx_in = 0;
        #(real'(BS - H0 + (codes[i] + 1) * S) * 10ns + real'($urandom % 7) * 1ns - 3ns);
      end
      rx_in = 1;
      exp_q.push_back(codes[$]);
      #(real'(H0) * 10ns);
      rx_in = 0;
    end
    repeat (BS + (M + 3) * S) @(negedge clk);
    check(exp_q.size() == 0, "all codes decided");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
