// Behavioural model of the interface PLL (not synthesizable: a PLL is an
// analog macro). It stands in for the real part in simulation and has its
// ports.
//
// From the reference clock clk_in it makes the four reference clocks of the
// interface: the high-speed clocks clk_outT2 (modulator) and clk_outR2
// (demodulator) at f_in * mul / div, and the low-speed clocks clk_outT1
// (data load before the modulator) and clk_outR1 (data output after the
// demodulator) at f_in / ls_div. The model measures the clk_in period, waits
// LOCK_CYCLES reference periods and then raises locked and starts the output
// clocks. A change of cfg, or a setting with a zero factor, drops locked and
// stops the outputs (held low) until it has locked again on the new setting.
// The four clocks and their roles are the design's; the frequency plan
// (500 MHz and 5 MHz from a 50 MHz reference by default) and the lock
// behaviour are this model's.
module mdpcm_pll
  import mdpcm_pkg::*;
#(
  parameter int unsigned LOCK_CYCLES = 16
) (
  input  logic     clk_in,
  input  logic     rst_n,
  input  pll_cfg_t cfg,
  output logic     clk_outT1,
  output logic     clk_outT2,
  output logic     clk_outR1,
  output logic     clk_outR2,
  output logic     locked
);

  realtime  t_last;
  realtime  t_in;
  realtime  hs_half;
  realtime  ls_half;
  pll_cfg_t cfg_q;
  int       lock_cnt;
  logic     clk_hs;
  logic     clk_ls;

  initial begin
    t_last   = 0.0;
    t_in     = 0.0;
    cfg_q    = DEF_PLL;
    lock_cnt = 0;
    locked   = 1'b0;
  end

  always @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      locked   = 1'b0;
      lock_cnt = 0;
      t_last   = 0.0;
    end else begin
      if (t_last > 0.0) t_in = $realtime - t_last;
      t_last = $realtime;
      if (cfg != cfg_q) begin
        cfg_q    = cfg;
        locked   = 1'b0;
        lock_cnt = 0;
      end else if (cfg_q.mul == 0 || cfg_q.div == 0 || cfg_q.ls_div == 0) begin
        locked   = 1'b0;
        lock_cnt = 0;
      end else if (!locked && t_in > 0.0) begin
        if (lock_cnt >= int'(LOCK_CYCLES)) begin
          hs_half = t_in * real'(cfg_q.div) / real'(cfg_q.mul) / 2.0;
          ls_half = t_in * real'(cfg_q.ls_div) / 2.0;
          locked  = 1'b1;
        end else begin
          lock_cnt = lock_cnt + 1;
        end
      end
    end
  end

  initial begin
    clk_hs = 1'b0;
    forever begin
      if (locked) begin
        #(hs_half) clk_hs = locked ? ~clk_hs : 1'b0;
      end else begin
        clk_hs = 1'b0;
        @(posedge locked);
      end
    end
  end

  initial begin
    clk_ls = 1'b0;
    forever begin
      if (locked) begin
        #(ls_half) clk_ls = locked ? ~clk_ls : 1'b0;
      end else begin
        clk_ls = 1'b0;
        @(posedge locked);
      end
    end
  end

  assign clk_outT2 = clk_hs && locked;
  assign clk_outR2 = clk_hs && locked;
  assign clk_outT1 = clk_ls && locked;
  assign clk_outR1 = clk_ls && locked;

endmodule
