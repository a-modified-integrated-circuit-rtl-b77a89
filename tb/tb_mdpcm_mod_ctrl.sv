// Self-checking test of the modulator controller: run follows the enable
// two to three clocks later and only with a valid parameter set, the set in
// use is copied at that moment and then ignores later changes, a bad set
// raises cfg_err instead, run waits for the generator to finish an earlier
// burst, and sent_tgl toggles once per symbol sent.
module tb_mdpcm_mod_ctrl;
  import mdpcm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en_async = 0, gen_busy = 0, gen_sent = 0;
  mdpcm_cfg_t cfg_in, cfg;
  logic run, cfg_err, active, sent_tgl;

  always #5ns clk = ~clk;

  mdpcm_mod_ctrl dut (.*);

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

  localparam mdpcm_cfg_t GOOD = '{mode: MAP_GRAY, bits: 4'd7, t_h0: 16'd100, t_l: 16'd90, t_slot: 8'd5};

  initial begin
    logic t0;
    cfg_in = GOOD;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!run && !active && !cfg_err, "idle after reset");
    check(cfg.bits == DEF_BITS && cfg.t_h0 == DEF_T_H0 && cfg.t_slot == DEF_SLOT, "reset parameters");
    en_async = 1;
    @(negedge clk);
    check(!run, "not before two clocks");
    repeat (2) @(negedge clk);
    check(run && !active, "run after enable, nothing to send yet");
    check(cfg == GOOD, "parameters copied");
    cfg_in.t_h0 = 16'd7;
    repeat (3) @(negedge clk);
    check(cfg.t_h0 == 16'd100, "parameters frozen while running");
    // symbol toggles
    t0 = sent_tgl;
    for (int i = 0; i < 5; i++) begin
      gen_sent = 1; @(negedge clk); gen_sent = 0; @(negedge clk);
    end
    check(sent_tgl == ~t0, "five toggles");
    gen_sent = 1; @(negedge clk); gen_sent = 0;
    check(sent_tgl == t0, "six toggles");
    // disable while the generator is still busy
    gen_busy = 1;
    en_async = 0;
    repeat (3) @(negedge clk);
    check(!run && active, "run drops, still active");
    en_async = 1;
    repeat (5) @(negedge clk);
    check(!run, "waits for the generator");
    gen_busy = 0;
    repeat (2) @(negedge clk);
    check(run && cfg.t_h0 == 16'd7, "restart with new parameters");
    // bad parameter sets
    en_async = 0; repeat (3) @(negedge clk);
    cfg_in = GOOD; cfg_in.bits = 4'd15;
    en_async = 1; repeat (4) @(negedge clk);
    check(!run && cfg_err, "b too large refused");
    en_async = 0; repeat (3) @(negedge clk);
    check(!cfg_err, "error cleared by disable");
    cfg_in = GOOD; cfg_in.t_slot = '0;
    en_async = 1; repeat (4) @(negedge clk);
    check(!run && cfg_err, "zero slot refused");
    en_async = 0; repeat (3) @(negedge clk);
    cfg_in = GOOD; cfg_in.bits = 4'd14;
    en_async = 1; repeat (4) @(negedge clk);
    check(run && !cfg_err, "b = 14 accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
