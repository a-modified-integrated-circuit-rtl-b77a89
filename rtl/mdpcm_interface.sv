// MDPCM interface: one chip's side of a link that carries b-bit words as
// pulse periods (M-ary digital pulse cycle modulation) over a single wire.
//
// A word m becomes one period of the line: high for t_H0, low for t_L, then
// low for (c+1) slots, c being m or its gray code. Because the receiver only
// has to time rising edges with slot resolution, a slow, band-limited line
// can carry several bits per pulse without ever switching faster than
// 1/(t_H0 + t_L).
//
// Blocks: the interface CPU (parameters, enables, status, on clk_in), the PLL
// (clk_outT1/T2 for the transmit side, clk_outR1/R2 for the receive side),
// the MDPCM modulator (input data latch, data mapper, generator, controller)
// and the MDPCM demodulator (recognizer, anti-mapper, output data latch,
// controller). Transmit and receive are independent, so two of these joined
// output-to-input in both directions form a full-duplex link, and one alone
// can serve as a transmitter or a receiver only.
//
// Interface:
//   clk_in, rst_n          reference clock and asynchronous reset
//   ctrl_* / resp_*        register access to the CPU (see mdpcm_cpu)
//   clk_outT1/T2/R1/R2     the PLL clocks, brought out for the bus users
//   tx_data/valid/ready    transmit bus, synchronous to clk_outT1
//   rx_data/valid/ready    receive bus, synchronous to clk_outR1
//   tx_out / rx_in         the line, out and in
// Every clock domain is reset asynchronously by rst_n and leaves reset on
// its own clock. The PLL clocks stand still while it is not locked; as the
// CPU accepts a new PLL setting only while both directions are disabled and
// the modulator is idle, a relock never cuts a symbol. The block structure and
// clock roles follow the design; the register map, handshakes, reset scheme
// and frequency plan are this implementation's.
module mdpcm_interface
  import mdpcm_pkg::*;
#(
  parameter int unsigned LATCH_DEPTH = 2
) (
  input  logic             clk_in,
  input  logic             rst_n,
  // control bus
  input  logic             ctrl_valid,
  input  logic             ctrl_we,
  input  logic [2:0]       ctrl_addr,
  input  logic [31:0]      ctrl_wdata,
  output logic             resp_valid,
  output logic             resp_err,
  output logic [31:0]      resp_rdata,
  // clocks
  output logic             clk_outT1,
  output logic             clk_outT2,
  output logic             clk_outR1,
  output logic             clk_outR2,
  output logic             pll_locked,
  // bit-width programmable data buses
  input  logic             tx_valid,
  output logic             tx_ready,
  input  logic [MAX_B-1:0] tx_data,
  output logic             rx_valid,
  input  logic             rx_ready,
  output logic [MAX_B-1:0] rx_data,
  // line
  output logic             tx_out,
  input  logic             rx_in
);

  mdpcm_cfg_t cfg;
  pll_cfg_t   pll_cfg;
  logic       tx_en, rx_en;
  logic       tx_active, tx_cfg_err, tx_sent_tgl;
  logic       rx_active, rx_cfg_err, rx_tgl, rx_end_tgl, rx_ovf_tgl;
  logic       rst_cpu_n, rst_t1_n, rst_t2_n, rst_r1_n, rst_r2_n;
  mdpcm_rst_sync u_rs_cpu (.clk(clk_in),    .rst_in_n(rst_n),     .rst_out_n(rst_cpu_n));
  mdpcm_rst_sync u_rs_t1  (.clk(clk_outT1), .rst_in_n(rst_n)    , .rst_out_n(rst_t1_n));
  mdpcm_rst_sync u_rs_t2  (.clk(clk_outT2), .rst_in_n(rst_n)    , .rst_out_n(rst_t2_n));
  mdpcm_rst_sync u_rs_r1  (.clk(clk_outR1), .rst_in_n(rst_n)    , .rst_out_n(rst_r1_n));
  mdpcm_rst_sync u_rs_r2  (.clk(clk_outR2), .rst_in_n(rst_n)    , .rst_out_n(rst_r2_n));

  mdpcm_cpu u_cpu (
    .clk(clk_in), .rst_n(rst_cpu_n),
    .ctrl_valid(ctrl_valid), .ctrl_we(ctrl_we), .ctrl_addr(ctrl_addr),
    .ctrl_wdata(ctrl_wdata),
    .resp_valid(resp_valid), .resp_err(resp_err), .resp_rdata(resp_rdata),
    .cfg(cfg), .pll_cfg(pll_cfg), .tx_en(tx_en), .rx_en(rx_en),
    .pll_locked(pll_locked),
    .tx_active(tx_active), .tx_cfg_err(tx_cfg_err), .tx_sent_tgl(tx_sent_tgl),
    .rx_active(rx_active), .rx_cfg_err(rx_cfg_err), .rx_tgl(rx_tgl),
    .rx_end_tgl(rx_end_tgl), .rx_ovf_tgl(rx_ovf_tgl)
  );

  mdpcm_pll u_pll (
    .clk_in(clk_in), .rst_n(rst_n), .cfg(pll_cfg),
    .clk_outT1(clk_outT1), .clk_outT2(clk_outT2),
    .clk_outR1(clk_outR1), .clk_outR2(clk_outR2),
    .locked(pll_locked)
  );

  mdpcm_modulator #(.LATCH_DEPTH(LATCH_DEPTH)) u_mod (
    .clk_t1(clk_outT1), .rst_t1_n(rst_t1_n),
    .data_valid(tx_valid), .data_ready(tx_ready), .data(tx_data),
    .clk_t2(clk_outT2), .rst_t2_n(rst_t2_n),
    .tx_out(tx_out),
    .en(tx_en), .cfg_in(cfg),
    .active(tx_active), .cfg_err(tx_cfg_err), .sent_tgl(tx_sent_tgl)
  );

  mdpcm_demodulator #(.LATCH_DEPTH(LATCH_DEPTH)) u_demod (
    .clk_r2(clk_outR2), .rst_r2_n(rst_r2_n), .rx_in(rx_in),
    .clk_r1(clk_outR1), .rst_r1_n(rst_r1_n),
    .data_valid(rx_valid), .data_ready(rx_ready), .data(rx_data),
    .en(rx_en), .cfg_in(cfg),
    .active(rx_active), .cfg_err(rx_cfg_err),
    .rx_tgl(rx_tgl), .end_tgl(rx_end_tgl), .ovf_tgl(rx_ovf_tgl)
  );

endmodule
