// Demodulator controller: the demodulator's link to the interface CPU.
//
// It runs on clk_outR2. The CPU's receive enable crosses through a two-flop
// synchronizer; the parameter set is quasi-static (changed by the CPU only
// while disabled). On the rise of the synchronized enable the set is checked
// (b between 1 and MAX_B, no zero duration), copied into a local register and
// run is raised, which starts the recognizer. A bad set raises cfg_err until
// the enable is dropped. Dropping the enable stops the recognizer at once.
//
// Response towards the CPU, as toggles that cross clocks through plain
// synchronizers: rx_tgl (a message was handed to the output data latch),
// end_tgl (a burst ended: a period ran past the longest valid symbol) and
// ovf_tgl (a message was lost because the output data latch was full).
// The existence of this controller is the design's; its registers, checks
// and responses are choices of this implementation.
module mdpcm_demod_ctrl
  import mdpcm_pkg::*;
(
  input  logic       clk,        // clk_outR2
  input  logic       rst_n,
  input  logic       en_async,   // receive enable from the CPU
  input  mdpcm_cfg_t cfg_in,     // parameter set from the CPU
  input  logic       sym_ok,     // a message was written to the latch
  input  logic       sym_lost,   // a message found the latch full
  input  logic       burst_end,  // recognizer timed out
  output mdpcm_cfg_t cfg,        // parameter set in use
  output logic       run,
  output logic       cfg_err,
  output logic       rx_tgl,
  output logic       end_tgl,
  output logic       ovf_tgl
);

  logic en_s;

  mdpcm_sync u_sync (.clk(clk), .rst_n(rst_n), .d(en_async), .q(en_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg     <= '{mode: MAP_BINARY, bits: DEF_BITS, t_h0: DEF_T_H0,
                   t_l: DEF_T_L, t_slot: DEF_SLOT};
      run     <= 1'b0;
      cfg_err <= 1'b0;
      rx_tgl  <= 1'b0;
      end_tgl <= 1'b0;
      ovf_tgl <= 1'b0;
    end else begin
      if (sym_ok)    rx_tgl  <= ~rx_tgl;
      if (sym_lost)  ovf_tgl <= ~ovf_tgl;
      if (burst_end) end_tgl <= ~end_tgl;
      if (!en_s) begin
        run     <= 1'b0;
        cfg_err <= 1'b0;
      end else if (!run && !cfg_err) begin
        if (cfg_ok(cfg_in)) begin
          cfg <= cfg_in;
          run <= 1'b1;
        end else begin
          cfg_err <= 1'b1;
        end
      end
    end
  end

endmodule
