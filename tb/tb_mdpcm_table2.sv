// Workload test: the six link settings of the demonstration measurements,
// run end to end between two interfaces at their default parameters
// (t_H0 = t_L = 3 us as 1500 periods of the 500 MHz PLL clock).
//
//   t_slot   0.01 us (5 periods)  b = 7, 8, 9
//   t_slot  0.006 us (3 periods)  b = 8, 9, 10
//
// For each setting interface A sends every one of the M = 2**b messages once,
// in a scrambled order, to interface B; all must arrive in that order. The
// bench measures the line time of the burst on A's output and from it the
// mean symbol period T_mean, which over all M messages is
// t_BS + (M+1)/2 * t_slot. It reports the bandwidth efficiency
// r = b * t_BS / (2 * T_mean) = b / (a*(M+1) + 2), a = t_slot / t_BS, and the
// equivalent rate r * 320 kbit/s (the rate of the conventional link), and
// checks both against the published figures to 0.2 %. The true mean bit rate
// of the line, b / T_mean, is printed as well.
module tb_mdpcm_table2;
  import mdpcm_pkg::*;

  int checks = 0, failures = 0;

  logic             clk_in [2];
  logic             rst_n = 1;
  logic             ctrl_valid [2], ctrl_we [2];
  logic [2:0]       ctrl_addr [2];
  logic [31:0]      ctrl_wdata [2];
  logic             resp_valid [2], resp_err [2];
  logic [31:0]      resp_rdata [2];
  logic             clk_outT1 [2], clk_outT2 [2], clk_outR1 [2], clk_outR2 [2];
  logic             pll_locked [2];
  logic             tx_valid [2], tx_ready [2], rx_valid [2], rx_ready [2];
  logic [MAX_B-1:0] tx_data [2], rx_data [2];
  logic             tx_out [2], rx_in [2];

  int tx_q [$], exp_q [$];
  int n_got = 0;

  initial begin
    clk_in[0] = 0;
    forever #10ns clk_in[0] = ~clk_in[0];
  end
  initial begin
    clk_in[1] = 0;
    #7.3ns;
    forever #9.999ns clk_in[1] = ~clk_in[1];
  end

  always @(tx_out[0]) rx_in[1] <= #(300ns) tx_out[0];
  initial rx_in[0] = 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  for (genvar i = 0; i < 2; i++) begin : g_chip
    mdpcm_interface u_if (
      .clk_in(clk_in[i]), .rst_n(rst_n),
      .ctrl_valid(ctrl_valid[i]), .ctrl_we(ctrl_we[i]), .ctrl_addr(ctrl_addr[i]),
      .ctrl_wdata(ctrl_wdata[i]),
      .resp_valid(resp_valid[i]), .resp_err(resp_err[i]), .resp_rdata(resp_rdata[i]),
      .clk_outT1(clk_outT1[i]), .clk_outT2(clk_outT2[i]),
      .clk_outR1(clk_outR1[i]), .clk_outR2(clk_outR2[i]),
      .pll_locked(pll_locked[i]),
      .tx_valid(tx_valid[i]), .tx_ready(tx_ready[i]), .tx_data(tx_data[i]),
      .rx_valid(rx_valid[i]), .rx_ready(rx_ready[i]), .rx_data(rx_data[i]),
      .tx_out(tx_out[i]), .rx_in(rx_in[i])
    );
  end

  // A's transmit feeder
  initial begin tx_valid[0] = 0; tx_data[0] = '0; tx_valid[1] = 0; tx_data[1] = '0; end
  always @(negedge clk_outT1[0]) begin
    tx_valid[0] = tx_q.size() > 0;
    tx_data[0]  = tx_valid[0] ? MAX_B'(tx_q[0]) : '0;
  end
  always @(posedge clk_outT1[0]) begin
    if (tx_valid[0] && tx_ready[0]) exp_q.push_back(tx_q.pop_front());
  end
  // B's reader
  initial begin rx_ready[0] = 1'b1; rx_ready[1] = 1'b0; end
  always @(negedge clk_outR1[1]) rx_ready[1] = 1'b1;
  always @(posedge clk_outR1[1]) begin
    if (rx_valid[1] && rx_ready[1]) begin
      int e;
      check(exp_q.size() > 0, "word with none expected");
      if (exp_q.size() > 0) begin
        e = exp_q.pop_front();
        check(int'(rx_data[1]) == e, $sformatf("got %0d expected %0d", rx_data[1], e));
      end
      n_got++;
    end
  end

  // line time of A's output
  realtime first_rise, last_rise;
  int      n_rise = 0;
  always @(posedge tx_out[0]) begin
    if (n_rise == 0) first_rise = $realtime;
    last_rise = $realtime;
    n_rise++;
  end

  task automatic wait_clk(int chip);
    if (chip == 0) @(negedge clk_in[0]); else @(negedge clk_in[1]);
  endtask

  task automatic wr(int chip, int addr, logic [31:0] wd);
    wait_clk(chip);
    ctrl_valid[chip] = 1; ctrl_we[chip] = 1;
    ctrl_addr[chip] = 3'(addr); ctrl_wdata[chip] = wd;
    wait_clk(chip);
    ctrl_valid[chip] = 0;
    check(resp_valid[chip] && !resp_err[chip], "write accepted");
  endtask

  task automatic tx_idle();
    do begin
      #2us;
      wait_clk(0);
      ctrl_valid[0] = 1; ctrl_we[0] = 0; ctrl_addr[0] = 3'd6;
      wait_clk(0);
      ctrl_valid[0] = 0;
    end while (resp_rdata[0][0]);
  endtask

  initial begin
    #60ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the published settings and results
  localparam int  ROWS = 6;
  localparam int  SLOT [ROWS] = '{5, 5, 5, 3, 3, 3};
  localparam int  BITS [ROWS] = '{7, 8, 9, 8, 9, 10};
  localparam real R_PUB [ROWS] = '{3.16, 3.294, 3.152, 3.545, 3.581, 3.306};
  localparam real RB_PUB [ROWS] = '{1011.2, 1054.08, 1008.64, 1134.4, 1145.9, 1057.9};

  initial begin
    for (int c = 0; c < 2; c++) begin
      ctrl_valid[c] = 0; ctrl_we[c] = 0; ctrl_addr[c] = '0; ctrl_wdata[c] = '0;
    end
    #1ns rst_n = 0;
    #100ns rst_n = 1;
    wait (pll_locked[0] && pll_locked[1]);
    #500ns;
    for (int row = 0; row < ROWS; row++) begin
      int  b, m_cnt, step;
      real t_bs_ns, t_mean, r, rb, rate;
      b = BITS[row];
      m_cnt = 1 << b;
      for (int c = 0; c < 2; c++) begin
        wr(c, 1, 32'(b));
        wr(c, 4, 32'(SLOT[row]));
      end
      wr(1, 0, 32'h2);
      wr(0, 0, 32'h1);
      n_rise = 0;
      n_got = 0;
      step = 2 * (m_cnt / 3) + 1;       // odd: visits every message once
      for (int k = 0; k < m_cnt; k++) tx_q.push_back((k * step) % m_cnt);
      wait (tx_q.size() == 0);
      tx_idle();
      #(20us);
      check(n_got == m_cnt && exp_q.size() == 0, $sformatf("row %0d: %0d of %0d received", row, n_got, m_cnt));
      check(n_rise == m_cnt + 1, "one burst");
      t_bs_ns = 3000.0 * 2.0;
      t_mean = (last_rise - first_rise) / 1ns / real'(m_cnt);
      r = real'(b) * t_bs_ns / (2.0 * t_mean);
      rb = r * 320.0;
      rate = real'(b) / t_mean * 1.0e6;
      $display("t_slot=%0d ns b=%0d M=%0d: T_mean=%0.2f ns r=%0.4f (published %0.3f) R_b=%0.1f kbit/s (published %0.2f), line mean %0.1f kbit/s",
               SLOT[row] * 2, b, m_cnt, t_mean, r, R_PUB[row], rb, RB_PUB[row], rate);
      check(r > R_PUB[row] * 0.998 && r < R_PUB[row] * 1.002, "r as published");
      check(rb > RB_PUB[row] * 0.998 && rb < RB_PUB[row] * 1.002, "R_b as published");
      wr(0, 0, 32'h0);
      wr(1, 0, 32'h0);
      #1us;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
