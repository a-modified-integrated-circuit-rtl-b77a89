// Self-checking test of the interface CPU: reset values, write and read-back
// of every parameter register and the outputs they drive, the one-cycle
// response, refusal of parameter writes while a direction is enabled or the
// modulator is still active, refusal of writes to read-only registers, the
// status bits, and the counters fed by toggles from the other clock domains.
module tb_mdpcm_cpu;
  import mdpcm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic ctrl_valid = 0, ctrl_we = 0;
  logic [2:0] ctrl_addr = '0;
  logic [31:0] ctrl_wdata = '0;
  logic resp_valid, resp_err;
  logic [31:0] resp_rdata;
  mdpcm_cfg_t cfg;
  pll_cfg_t pll_cfg;
  logic tx_en, rx_en;
  logic pll_locked = 0, tx_active = 0, tx_cfg_err = 0, tx_sent_tgl = 0;
  logic rx_active = 0, rx_cfg_err = 0, rx_tgl = 0, rx_end_tgl = 0, rx_ovf_tgl = 0;

  always #10ns clk = ~clk;

  mdpcm_cpu dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one request; returns the response
  task automatic access(input bit we, input int addr, input logic [31:0] wd,
                        output logic [31:0] rd, output logic err);
    @(negedge clk);
    ctrl_valid = 1; ctrl_we = we; ctrl_addr = 3'(addr); ctrl_wdata = wd;
    @(negedge clk);
    ctrl_valid = 0;
    check(resp_valid, "response one cycle later");
    rd = resp_rdata; err = resp_err;
    @(negedge clk);
    check(!resp_valid, "single response");
  endtask

  initial begin
    logic [31:0] rd;
    logic err;
    repeat (2) @(negedge clk);
    rst_n = 1;
    access(0, 1, 0, rd, err);
    check(rd == 32'd9 && !err, "reset b = 9, binary");
    access(0, 2, 0, rd, err);  check(rd == 32'd1500, "reset t_H0");
    access(0, 3, 0, rd, err);  check(rd == 32'd1500, "reset t_L");
    access(0, 4, 0, rd, err);  check(rd == 32'd3, "reset t_slot");
    access(0, 5, 0, rd, err);  check(rd == 32'h000A010A, "reset PLL");
    // writes
    access(1, 1, 32'h108, rd, err);
    check(!err && cfg.bits == 4'd8 && cfg.mode == MAP_GRAY, "write MAP");
    access(1, 2, 32'd321, rd, err);  check(!err && cfg.t_h0 == 16'd321, "write T_H0");
    access(1, 3, 32'd222, rd, err);  check(!err && cfg.t_l == 16'd222, "write T_L");
    access(1, 4, 32'd5, rd, err);    check(!err && cfg.t_slot == 8'd5, "write T_SLOT");
    access(1, 5, 32'h0A0306, rd, err);
    check(!err && pll_cfg.mul == 8'd6 && pll_cfg.div == 8'd3 && pll_cfg.ls_div == 8'd10, "write PLL");
    access(0, 1, 0, rd, err);  check(rd == 32'h108, "read MAP");
    access(0, 2, 0, rd, err);  check(rd == 32'd321, "read T_H0");
    // enables and refusals
    access(1, 0, 32'd1, rd, err);
    check(!err && tx_en && !rx_en, "tx enable");
    access(1, 2, 32'd9, rd, err);
    check(err && cfg.t_h0 == 16'd321, "refused while tx enabled");
    access(1, 0, 32'd2, rd, err);
    check(!err && !tx_en && rx_en, "rx enable");
    access(1, 5, 32'h010101, rd, err);
    check(err && pll_cfg.mul == 8'd6, "PLL refused while rx enabled");
    access(1, 0, 32'd0, rd, err);
    tx_active = 1;
    repeat (3) @(negedge clk);
    access(1, 4, 32'd9, rd, err);
    check(err && cfg.t_slot == 8'd5, "refused while modulator active");
    tx_active = 0;
    repeat (3) @(negedge clk);
    access(1, 4, 32'd9, rd, err);
    check(!err && cfg.t_slot == 8'd9, "accepted when idle");
    access(1, 6, 32'hFFFF, rd, err);  check(err, "status is read only");
    access(1, 7, 32'hFFFF, rd, err);  check(err, "count is read only");
    // status and counters
    pll_locked = 1; rx_active = 1; rx_cfg_err = 1;
    repeat (3) @(negedge clk);
    access(0, 6, 0, rd, err);
    check(rd[2:0] == 3'b110 && rd[4:3] == 2'b10, "status bits");
    for (int i = 0; i < 7; i++) begin
      tx_sent_tgl = ~tx_sent_tgl; repeat (3) @(negedge clk);
    end
    for (int i = 0; i < 4; i++) begin
      rx_tgl = ~rx_tgl; repeat (3) @(negedge clk);
    end
    rx_end_tgl = 1; rx_ovf_tgl = 1; repeat (3) @(negedge clk);
    rx_ovf_tgl = 0; repeat (3) @(negedge clk);
    access(0, 7, 0, rd, err);
    check(rd == {16'd4, 16'd7}, "symbol counts");
    access(0, 6, 0, rd, err);
    check(rd[15:8] == 8'd1 && rd[23:16] == 8'd2, "end and overflow counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
