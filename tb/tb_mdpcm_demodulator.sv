// Self-checking test of the MDPCM demodulator (recognizer, anti-mapper,
// output data latch and controller together) with t_H0 = 6, t_L = 5,
// t_slot = 3 clk_outR2 periods and b = 5. The bench builds the line waveform
// itself from random words (its own gray encoder), with edges placed at
// random points between receive clock edges, and reads the bus on clk_outR1
// with random stalls; the words must come out in order, in both mappings.
// With the bus not read at all, the latch keeps the first LATCH_DEPTH words
// of a burst and every later one must be reported as lost. Each burst must
// be reported as ended once.
module tb_mdpcm_demodulator;
  import mdpcm_pkg::*;

  localparam int H0 = 6, L = 5, S = 3, B = 5, M = 1 << B, BS = H0 + L;
  localparam realtime TCK = 10ns;

  int checks = 0, failures = 0;
  logic clk_r1 = 0, clk_r2 = 0, rst_r1_n = 0, rst_r2_n = 0, rx_in = 0;
  logic data_valid, data_ready = 0;
  logic [MAX_B-1:0] data;
  logic en = 0, active, cfg_err, rx_tgl, end_tgl, ovf_tgl;
  mdpcm_cfg_t cfg_in;

  int exp_q [$];
  int n_rx = 0, n_end = 0, n_ovf = 0;
  logic rx_d = 0, end_d = 0, ovf_d = 0;
  bit reading = 0;

  always #20ns clk_r1 = ~clk_r1;
  always #5ns  clk_r2 = ~clk_r2;

  mdpcm_demodulator dut (.*);

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

  always @(posedge clk_r1) begin
    if (rst_r1_n && data_valid && data_ready) begin
      check(exp_q.size() > 0, "unexpected word");
      if (exp_q.size() > 0) check(int'(data) == exp_q.pop_front(), "word");
    end
    data_ready <= reading && ($urandom % 4 != 0);
  end
  always @(posedge clk_r2) begin
    if (rst_r2_n && rx_tgl != rx_d) n_rx++;
    if (rst_r2_n && end_tgl != end_d) n_end++;
    if (rst_r2_n && ovf_tgl != ovf_d) n_ovf++;
    {rx_d, end_d, ovf_d} <= {rx_tgl, end_tgl, ovf_tgl};
  end

  function automatic int gray(int m);
    return m ^ (m >> 1);
  endfunction

  // send words as one burst; store_n of them are expected on the bus
  task automatic send(int w [$], map_mode_e mode, int store_n);
    foreach (w[i]) begin
      int c;
      c = (mode == MAP_GRAY) ? gray(w[i]) : w[i];
      rx_in = 1;
      if (i > 0 && i - 1 < store_n) exp_q.push_back(w[i - 1]);
      #(real'(H0) * TCK) rx_in = 0;
      #(real'(BS - H0 + (c + 1) * S) * TCK + real'($urandom % 9) * 1ns - 4ns);
    end
    rx_in = 1;
    if (w.size() - 1 < store_n) exp_q.push_back(w[w.size() - 1]);
    #(real'(H0) * TCK) rx_in = 0;
    #(real'(BS + (M + 4) * S) * TCK);
  endtask

  task automatic run_mode(map_mode_e mode, int n);
    int w [$];
    cfg_in = '{mode: mode, bits: B, t_h0: H0, t_l: L, t_slot: S};
    en = 1;
    #100ns;
    w.push_back(0); w.push_back(M - 1);
    for (int i = 0; i < n; i++) w.push_back($urandom % M);
    send(w, mode, w.size());
    wait (exp_q.size() == 0);
    en = 0;
    #100ns;
  endtask

  initial begin
    int w [$];
    #3.3ns;
    #50ns rst_r1_n = 1; rst_r2_n = 1;
    reading = 1;
    run_mode(MAP_BINARY, 30);
    run_mode(MAP_GRAY, 30);
    check(n_rx == 64 && n_end == 2 && n_ovf == 0, $sformatf("rx %0d end %0d", n_rx, n_end));
    // nobody reads: two words stay, the rest are lost
    reading = 0;
    #200ns;
    cfg_in = '{mode: MAP_GRAY, bits: B, t_h0: H0, t_l: L, t_slot: S};
    en = 1;
    #100ns;
    for (int i = 0; i < 10; i++) w.push_back($urandom % M);
    send(w, MAP_GRAY, 2);
    check(n_ovf == 8 && n_rx == 66, $sformatf("lost %0d", n_ovf));
    reading = 1;
    wait (exp_q.size() == 0);
    #500ns;
    check(n_end == 3, "three bursts ended");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
