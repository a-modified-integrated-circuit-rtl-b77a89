// Modulator controller: the modulator's link to the interface CPU.
//
// It runs on clk_outT2. The CPU's enable arrives through a two-flop
// synchronizer. The CPU's parameter set is treated as quasi-static: the CPU
// only changes it while both directions are disabled, so it is stable long
// before the synchronized enable rises. On that rise, and once the generator
// has finished any earlier burst, the controller checks the set (b between 1
// and MAX_B, no zero duration), copies it into its own register and raises
// run, which lets the generator start and the input data latch be read. A
// bad set raises cfg_err instead, until the enable is dropped. Dropping the
// enable clears run; the generator then closes its burst on its own.
//
// Response towards the CPU: active (the generator is inside a burst), cfg_err, and
// sent_tgl, which toggles once per symbol sent so that the count can cross
// into the CPU clock through a plain synchronizer. That the modulator has
// a controller setting the latch, mapper and generator and answering the
// CPU is the design's; the register set and this handshake are choices of
// this implementation.
module mdpcm_mod_ctrl
  import mdpcm_pkg::*;
(
  input  logic       clk,        // clk_outT2
  input  logic       rst_n,
  input  logic       en_async,   // transmit enable from the CPU
  input  mdpcm_cfg_t cfg_in,     // parameter set from the CPU
  input  logic       gen_busy,   // generator is inside a burst
  input  logic       gen_sent,   // generator finished a symbol
  output mdpcm_cfg_t cfg,        // parameter set in use
  output logic       run,
  output logic       cfg_err,
  output logic       active,
  output logic       sent_tgl
);

  logic en_s;

  mdpcm_sync u_sync (.clk(clk), .rst_n(rst_n), .d(en_async), .q(en_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg      <= '{mode: MAP_BINARY, bits: DEF_BITS, t_h0: DEF_T_H0,
                    t_l: DEF_T_L, t_slot: DEF_SLOT};
      run      <= 1'b0;
      cfg_err  <= 1'b0;
      sent_tgl <= 1'b0;
    end else begin
      if (gen_sent) sent_tgl <= ~sent_tgl;
      if (!en_s) begin
        run     <= 1'b0;
        cfg_err <= 1'b0;
      end else if (!run && !cfg_err && !gen_busy) begin
        if (cfg_ok(cfg_in)) begin
          cfg <= cfg_in;
          run <= 1'b1;
        end else begin
          cfg_err <= 1'b1;
        end
      end
    end
  end

  assign active = gen_busy;

endmodule
