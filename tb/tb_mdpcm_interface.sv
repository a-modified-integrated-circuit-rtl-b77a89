// End-to-end test of the MDPCM interface: two interfaces, A and B, each with
// its own 50 MHz reference (B's 100 ppm slower, so the two sides sample each
// other asynchronously), joined output-to-input in both directions through a
// 250 ns line delay. The line from B to A is also distorted: its falling
// edges arrive 1.5 us late, as when a slow fall crosses the input threshold
// late; the receiver times rising edges only and must not notice. Every setting is made through the control bus; the top
// keeps its default parameters and reset values (t_H0 = t_L = 1500,
// t_slot = 3 periods of the 500 MHz PLL clock, i.e. 3 us / 3 us / 6 ns, b = 9).
//
// Phases and the mechanisms they must show:
//   1  A -> B, binary mapping, b = 9, at the reset settings: words arrive in
//      order; the line time of the burst equals the sum of the symbol periods
//      t_BS + (m+1)*t_slot; the bus stalls while the input latch is full; a
//      parameter write while enabled is refused; the burst end is counted.
//   2  full duplex, gray mapping, b = 8, t_slot = 5 (10 ns).
//   3  B does not read: two words wait in its output latch, the rest are
//      counted as lost.
//   4  new PLL setting (250 MHz): both PLLs relock and the link works again.
//   5  b = 0: the modulator refuses the setting and reports it.
// Each mechanism is counted, and one that never happened is a failure.
module tb_mdpcm_interface;
  import mdpcm_pkg::*;

  localparam realtime LINE_DELAY = 250ns;
  localparam realtime FALL_DELAY = 1500ns;

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

  // mechanism counters
  int n_binary = 0, n_gray = 0, n_stall = 0, n_refused = 0, n_burst_end = 0;
  int n_lost = 0, n_relock = 0, n_cfg_err = 0, n_rate = 0, n_duplex = 0;
  int n_distort = 0;

  int  tx_q [2][$];      // words still to send, per chip
  int  exp_q [2][$];     // words expected at the receiving chip
  int  n_got [2];
  bit  reading [2];
  int  cur_bits = 9;

  initial begin
    clk_in[0] = 0;
    forever #10ns clk_in[0] = ~clk_in[0];
  end
  initial begin
    clk_in[1] = 0;
    #3.1ns;
    forever #10.001ns clk_in[1] = ~clk_in[1];
  end

  always @(tx_out[0]) rx_in[1] <= #(LINE_DELAY) tx_out[0];
  always @(tx_out[1]) rx_in[0] <= #(tx_out[1] ? LINE_DELAY : FALL_DELAY) tx_out[1];

  // distortion monitor: high time at A's input against B's output
  realtime tx1_rise, tx1_high, rx0_rise;
  always @(posedge tx_out[1]) tx1_rise = $realtime;
  always @(negedge tx_out[1]) tx1_high = $realtime - tx1_rise;
  always @(posedge rx_in[0])  rx0_rise = $realtime;
  always @(negedge rx_in[0])
    if (rst_n && ($realtime - rx0_rise) - tx1_high > 1us) n_distort++;

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

    // transmit feeder, clk_outT1
    initial begin
      tx_valid[i] = 0; tx_data[i] = '0;
    end
    always @(negedge clk_outT1[i]) begin
      tx_valid[i] = tx_q[i].size() > 0;
      tx_data[i]  = tx_valid[i] ? MAX_B'(tx_q[i][0]) : '0;
    end
    always @(posedge clk_outT1[i]) begin
      if (tx_valid[i] && tx_ready[i]) begin
        exp_q[1 - i].push_back(tx_q[i].pop_front());
      end else if (tx_valid[i] && !tx_ready[i]) begin
        n_stall++;
      end
    end

    // receive reader, clk_outR1
    initial rx_ready[i] = 0;
    always @(posedge clk_outR1[i]) begin
      if (rx_valid[i] && rx_ready[i]) begin
        check(exp_q[i].size() > 0, "word with none expected");
        if (exp_q[i].size() > 0) begin
          int e;
          e = exp_q[i].pop_front();
          check(int'(rx_data[i]) == e, $sformatf("chip %0d got %0d expected %0d", i, rx_data[i], e));
        end
        n_got[i]++;
      end
    end
    always @(negedge clk_outR1[i]) rx_ready[i] = reading[i] && ($urandom % 5 != 0);

    // lock losses
    always @(negedge pll_locked[i]) if (rst_n) n_relock++;
  end

  // line-time monitor on A's output
  realtime first_rise, last_rise;
  int      n_rise = 0;
  always @(posedge tx_out[0]) begin
    if (n_rise == 0) first_rise = $realtime;
    last_rise = $realtime;
    n_rise++;
  end

  // ---------------- control bus ----------------
  task automatic wait_clk(int chip);
    if (chip == 0) @(negedge clk_in[0]); else @(negedge clk_in[1]);
  endtask

  task automatic access(int chip, bit we, int addr, logic [31:0] wd,
                        output logic [31:0] rd, output logic err);
    wait_clk(chip);
    ctrl_valid[chip] = 1; ctrl_we[chip] = we;
    ctrl_addr[chip] = 3'(addr); ctrl_wdata[chip] = wd;
    wait_clk(chip);
    ctrl_valid[chip] = 0;
    check(resp_valid[chip], "response");
    rd = resp_rdata[chip]; err = resp_err[chip];
  endtask

  task automatic wr(int chip, int addr, logic [31:0] wd);
    logic [31:0] rd; logic err;
    access(chip, 1, addr, wd, rd, err);
    check(!err, $sformatf("write chip %0d addr %0d", chip, addr));
  endtask

  task automatic rd_reg(int chip, int addr, output logic [31:0] rd);
    logic err;
    access(chip, 0, addr, 0, rd, err);
  endtask

  // both chips get the same modulation settings
  task automatic set_mod(int bits, bit gray_map, int slot);
    for (int c = 0; c < 2; c++) begin
      wr(c, 1, 32'(bits) | (gray_map ? 32'h100 : 0));
      wr(c, 4, 32'(slot));
    end
    cur_bits = bits;
  endtask

  task automatic wait_idle(int chip);
    logic [31:0] st;
    do begin
      #1us;
      rd_reg(chip, 6, st);
    end while (st[0]);
  endtask

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] st, st_b, cnt;
    logic err;
    int words [$];
    real expect_ns;
    for (int c = 0; c < 2; c++) begin
      ctrl_valid[c] = 0; ctrl_we[c] = 0; ctrl_addr[c] = '0; ctrl_wdata[c] = '0;
      reading[c] = 0; n_got[c] = 0;
    end
    rx_in[0] = 0; rx_in[1] = 0;
    #1ns rst_n = 0;
    #100ns rst_n = 1;
    wait (pll_locked[0] && pll_locked[1]);
    #200ns;
    rd_reg(0, 6, st);
    check(st[2], "A reports PLL locked");

    $display("phase 1 at %0t", $time);
    // ---- phase 1: A -> B, binary, reset settings ----
    rd_reg(0, 1, st);
    check(st == 32'd9, "reset setting b = 9 binary");
    reading[1] = 1;
    wr(1, 0, 32'h2);              // B receives
    wr(0, 0, 32'h1);              // A transmits
    words = {0, 511, 256, 1, 510, 77, 300, 128, 255, 5, 400, 63};
    foreach (words[i]) tx_q[0].push_back(words[i]);
    access(0, 1, 2, 32'd100, st, err);
    if (err) n_refused++;
    check(err, "parameter write refused while enabled");
    wait (tx_q[0].size() == 0);
    wait_idle(0);
    #20us;
    check(exp_q[1].size() == 0 && n_got[1] == 12, "phase 1 words received");
    n_binary += n_got[1];
    // line time: rising edges at symbol starts plus the closing edge
    expect_ns = 0.0;
    foreach (words[i]) expect_ns += real'(1500 + 1500 + (words[i] + 1) * 3) * 2.0;
    check(n_rise == 13, $sformatf("%0d rising edges", n_rise));
    check((last_rise - first_rise) / 1ns > expect_ns * 0.9999 &&
          (last_rise - first_rise) / 1ns < expect_ns * 1.0001,
          $sformatf("burst line time %f ns, expected %f", (last_rise - first_rise) / 1ns, expect_ns));
    n_rate++;
    rd_reg(1, 6, st_b);
    n_burst_end += st_b[15:8];
    check(st_b[15:8] == 8'd1, "B saw one burst end");
    rd_reg(0, 7, cnt);
    check(cnt[15:0] == 16'd12, "A counted 12 symbols sent");
    rd_reg(1, 7, cnt);
    check(cnt[31:16] == 16'd12, "B counted 12 words received");
    wr(0, 0, 0); wr(1, 0, 0);
    wait_idle(0);

    $display("phase 2 at %0t", $time);
    // ---- phase 2: full duplex, gray, b = 8, t_slot = 10 ns ----
    set_mod(8, 1, 5);
    reading[0] = 1; reading[1] = 1;
    wr(0, 0, 32'h3); wr(1, 0, 32'h3);
    for (int i = 0; i < 16; i++) begin
      tx_q[0].push_back($urandom % 256);
      tx_q[1].push_back($urandom % 256);
    end
    tx_q[0].push_back(255); tx_q[1].push_back(0);
    wait (tx_q[0].size() == 0 && tx_q[1].size() == 0);
    wait_idle(0); wait_idle(1);
    #20us;
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0, "phase 2 both ways");
    check(n_got[0] == 17 && n_got[1] == 29, "phase 2 counts");
    n_gray += 34;
    n_duplex++;
    wr(0, 0, 0); wr(1, 0, 0);

    $display("phase 3 at %0t", $time);
    // ---- phase 3: B does not read ----
    reading[1] = 0;
    #1us;
    wr(1, 0, 32'h2); wr(0, 0, 32'h1);
    for (int i = 0; i < 6; i++) tx_q[0].push_back(i * 40);
    wait (tx_q[0].size() == 0);
    wait_idle(0);
    #20us;
    rd_reg(1, 6, st_b);
    n_lost = st_b[23:16];
    check(n_lost == 4, $sformatf("B lost %0d words", n_lost));
    // only the first two are kept
    while (exp_q[1].size() > 2) void'(exp_q[1].pop_back());
    reading[1] = 1;
    #5us;
    check(exp_q[1].size() == 0, "kept words read out");
    wr(0, 0, 0); wr(1, 0, 0);
    wait_idle(0);

    $display("phase 4 at %0t", $time);
    // ---- phase 4: PLL at 250 MHz ----
    begin
      int r0;
      r0 = n_relock;
      wr(0, 5, 32'h0A0105); wr(1, 5, 32'h0A0105);
      #1us;
      wait (pll_locked[0] && pll_locked[1]);
      check(n_relock == r0 + 2, "both PLLs relocked");
    end
    set_mod(9, 0, 3);
    #1us;
    wr(1, 0, 32'h2); wr(0, 0, 32'h1);
    n_rise = 0;
    words = {3, 500, 17, 260, 111};
    foreach (words[i]) tx_q[0].push_back(words[i]);
    wait (tx_q[0].size() == 0);
    wait_idle(0);
    #40us;
    check(exp_q[1].size() == 0, "link works after relock");
    n_binary += 5;
    expect_ns = 0.0;
    foreach (words[i]) expect_ns += real'(1500 + 1500 + (words[i] + 1) * 3) * 4.0;
    check((last_rise - first_rise) / 1ns > expect_ns * 0.9999 &&
          (last_rise - first_rise) / 1ns < expect_ns * 1.0001, "line time at 250 MHz");
    n_rate++;
    wr(0, 0, 0); wr(1, 0, 0);
    wait_idle(0);

    $display("phase 5 at %0t", $time);
    // ---- phase 5: invalid b ----
    wr(0, 1, 32'h0);
    wr(0, 0, 32'h1);
    #1us;
    rd_reg(0, 6, st);
    check(st[3] && !st[0], "b = 0 refused by the modulator");
    if (st[3]) n_cfg_err++;
    wr(0, 0, 0);

    // every mechanism must have happened
    $display("mechanisms: binary=%0d gray=%0d duplex=%0d stall=%0d refused=%0d burst_end=%0d lost=%0d relock=%0d cfg_err=%0d rate=%0d distorted=%0d",
             n_binary, n_gray, n_duplex, n_stall, n_refused, n_burst_end, n_lost, n_relock, n_cfg_err, n_rate,
             n_distort);
    check(n_binary > 0, "binary mapping used");
    check(n_gray > 0, "gray mapping used");
    check(n_duplex > 0, "full duplex");
    check(n_stall > 0, "input latch stalled the bus");
    check(n_refused > 0, "write refused");
    check(n_burst_end > 0, "burst end");
    check(n_lost > 0, "output latch overflow");
    check(n_relock > 0, "PLL relock");
    check(n_cfg_err > 0, "parameter error");
    check(n_rate > 0, "line time");
    check(n_distort > 0 && n_got[0] > 0, "distorted falling edges received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
