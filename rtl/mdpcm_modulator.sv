// MDPCM modulator: input data latch, data mapper, MDPCM generator and their
// controller.
//
// Words of up to MAX_B bits arrive on the bit-width programmable bus in the
// clk_outT1 domain with a valid/ready handshake and wait in the input data
// latch. In the clk_outT2 domain the generator takes one word per symbol,
// through the mapper (binary or gray, cut to b bits), and sends it as one
// pulse period on tx_out. The controller starts all this when the CPU
// enables transmission and reports back (active, cfg_err, sent_tgl).
//
// Timing: a word accepted on the bus is on the line as the next symbol the
// generator starts, a few clk_outT2 periods after the latch passes it on;
// symbols follow back to back while words keep coming. The structure follows
// the modulator block diagram; the handshakes are this implementation's.
module mdpcm_modulator
  import mdpcm_pkg::*;
#(
  parameter int unsigned LATCH_DEPTH = 2
) (
  // bus side, clk_outT1
  input  logic             clk_t1,
  input  logic             rst_t1_n,
  input  logic             data_valid,
  output logic             data_ready,
  input  logic [MAX_B-1:0] data,
  // pulse side, clk_outT2
  input  logic             clk_t2,
  input  logic             rst_t2_n,
  output logic             tx_out,
  // CPU side (quasi-static / asynchronous)
  input  logic             en,
  input  mdpcm_cfg_t       cfg_in,
  output logic             active,
  output logic             cfg_err,
  output logic             sent_tgl
);

  mdpcm_cfg_t       cfg;
  logic             run;
  logic             lat_valid, lat_ready;
  logic [MAX_B-1:0] lat_data, code;
  logic             gen_busy, gen_sent;

  mdpcm_data_latch #(.W(MAX_B), .DEPTH(LATCH_DEPTH)) u_latch (
    .wclk(clk_t1), .wrst_n(rst_t1_n),
    .wvalid(data_valid), .wready(data_ready), .wdata(data),
    .rclk(clk_t2), .rrst_n(rst_t2_n),
    .rvalid(lat_valid), .rready(lat_ready), .rdata(lat_data)
  );

  mdpcm_mapper u_mapper (
    .mode(cfg.mode), .bits(cfg.bits), .msg(lat_data), .code(code)
  );

  mdpcm_generator u_gen (
    .clk(clk_t2), .rst_n(rst_t2_n), .run(run), .cfg(cfg),
    .code_valid(lat_valid), .code_ready(lat_ready), .code(code),
    .tx_out(tx_out), .sent(gen_sent), .busy(gen_busy)
  );

  mdpcm_mod_ctrl u_ctrl (
    .clk(clk_t2), .rst_n(rst_t2_n), .en_async(en), .cfg_in(cfg_in),
    .gen_busy(gen_busy), .gen_sent(gen_sent),
    .cfg(cfg), .run(run), .cfg_err(cfg_err), .active(active),
    .sent_tgl(sent_tgl)
  );

endmodule
