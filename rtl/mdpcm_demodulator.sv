// MDPCM demodulator: MDPCM recognizer, anti-mapper, output data latch and
// their controller.
//
// The recognizer measures each pulse period on rx_in with clk_outR2 and
// decides its slot code; the anti-mapper turns the code back into a message
// of b bits; the output data latch carries it into the clk_outR1 domain,
// where it leaves on the bit-width programmable bus with a valid/ready
// handshake. If the latch is full when a message is decided, the message is
// dropped and counted as an overflow. The controller starts the recognizer
// when the CPU enables reception and reports back through toggles.
//
// Timing: a message is written to the latch four clk_outR2 edges after the
// rising edge that closed its period, and shows on the bus a few clk_outR1
// edges later. The structure follows the demodulator block diagram; the
// overflow rule and handshakes are this implementation's.
module mdpcm_demodulator
  import mdpcm_pkg::*;
#(
  parameter int unsigned LATCH_DEPTH = 2
) (
  // line side, clk_outR2
  input  logic             clk_r2,
  input  logic             rst_r2_n,
  input  logic             rx_in,
  // bus side, clk_outR1
  input  logic             clk_r1,
  input  logic             rst_r1_n,
  output logic             data_valid,
  input  logic             data_ready,
  output logic [MAX_B-1:0] data,
  // CPU side
  input  logic             en,
  input  mdpcm_cfg_t       cfg_in,
  output logic             active,
  output logic             cfg_err,
  output logic             rx_tgl,
  output logic             end_tgl,
  output logic             ovf_tgl
);

  mdpcm_cfg_t       cfg;
  logic             run;
  logic             code_valid, burst_end;
  logic [MAX_B-1:0] code, msg;
  logic             lat_ready;

  mdpcm_recognizer u_rec (
    .clk(clk_r2), .rst_n(rst_r2_n), .run(run), .cfg(cfg), .rx_in(rx_in),
    .code_valid(code_valid), .code(code), .burst_end(burst_end),
    .active(active)
  );

  mdpcm_demapper u_demap (
    .mode(cfg.mode), .bits(cfg.bits), .code(code), .msg(msg)
  );

  mdpcm_data_latch #(.W(MAX_B), .DEPTH(LATCH_DEPTH)) u_latch (
    .wclk(clk_r2), .wrst_n(rst_r2_n),
    .wvalid(code_valid), .wready(lat_ready), .wdata(msg),
    .rclk(clk_r1), .rrst_n(rst_r1_n),
    .rvalid(data_valid), .rready(data_ready), .rdata(data)
  );

  mdpcm_demod_ctrl u_ctrl (
    .clk(clk_r2), .rst_n(rst_r2_n), .en_async(en), .cfg_in(cfg_in),
    .sym_ok(code_valid && lat_ready), .sym_lost(code_valid && !lat_ready),
    .burst_end(burst_end),
    .cfg(cfg), .run(run), .cfg_err(cfg_err),
    .rx_tgl(rx_tgl), .end_tgl(end_tgl), .ovf_tgl(ovf_tgl)
  );

endmodule
