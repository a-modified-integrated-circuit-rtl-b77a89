// Self-checking test of the demodulator controller: run follows the enable
// only with a valid parameter set, the set is copied when run rises and then
// frozen, a bad set raises cfg_err, dropping the enable stops run at once
// (three clocks), and each of the three events toggles its own response line.
module tb_mdpcm_demod_ctrl;
  import mdpcm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en_async = 0;
  logic sym_ok = 0, sym_lost = 0, burst_end = 0;
  mdpcm_cfg_t cfg_in, cfg;
  logic run, cfg_err, rx_tgl, end_tgl, ovf_tgl;

  always #5ns clk = ~clk;

  mdpcm_demod_ctrl dut (.*);

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

  localparam mdpcm_cfg_t GOOD = '{mode: MAP_GRAY, bits: 4'd10, t_h0: 16'd30, t_l: 16'd20, t_slot: 8'd4};

  initial begin
    logic r0, e0, o0;
    cfg_in = GOOD;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!run && !cfg_err, "idle after reset");
    en_async = 1;
    repeat (3) @(negedge clk);
    check(run && cfg == GOOD, "run with copied parameters");
    cfg_in.bits = 4'd3;
    repeat (2) @(negedge clk);
    check(cfg.bits == 4'd10, "frozen while running");
    {r0, e0, o0} = {rx_tgl, end_tgl, ovf_tgl};
    sym_ok = 1; @(negedge clk); sym_ok = 0;
    check(rx_tgl != r0 && end_tgl == e0 && ovf_tgl == o0, "rx toggle");
    burst_end = 1; @(negedge clk); burst_end = 0;
    check(end_tgl != e0 && ovf_tgl == o0, "end toggle");
    sym_lost = 1; @(negedge clk); sym_lost = 0;
    check(ovf_tgl != o0, "overflow toggle");
    en_async = 0;
    repeat (2) @(negedge clk);
    check(run, "still running after two clocks");
    @(negedge clk);
    check(!run, "stops after three clocks");
    en_async = 1;
    repeat (3) @(negedge clk);
    check(run && cfg.bits == 4'd3, "restart with new parameters");
    en_async = 0; repeat (3) @(negedge clk);
    cfg_in = GOOD; cfg_in.bits = '0;
    en_async = 1; repeat (4) @(negedge clk);
    check(!run && cfg_err, "b = 0 refused");
    en_async = 0; repeat (3) @(negedge clk);
    cfg_in = GOOD; cfg_in.t_l = '0;
    en_async = 1; repeat (4) @(negedge clk);
    check(!run && cfg_err, "zero t_L refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
