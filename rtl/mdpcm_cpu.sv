// Interface CPU (central controller) of the MDPCM interface.
//
// The outside world sets the interface up through this block: it writes the
// modulation parameters and the PLL settings, enables transmission and
// reception, and reads status. Every request gets a response one clock later.
// The block runs on the reference clock clk_in.
//
// Control bus: ctrl_valid marks a request, ctrl_we a write, ctrl_addr picks a
// register. Response: resp_valid one cycle later, with resp_rdata (read data,
// or the register's value after a write) and resp_err.
//
//   addr 0  CTRL    [0] tx_en  [1] rx_en
//   addr 1  MAP     [3:0] b (bits per symbol)  [8] gray mapping
//   addr 2  T_H0    [15:0] high time, clk_outT2/R2 periods
//   addr 3  T_L     [15:0] low time of the base symbol
//   addr 4  T_SLOT  [7:0]  slot length
//   addr 5  PLL     [7:0] mul  [15:8] div  [23:16] ls_div
//   addr 6  STATUS  [0] tx active [1] rx active [2] PLL locked
//                   [3] tx parameter error [4] rx parameter error
//                   [15:8] bursts ended [23:16] messages lost (read only)
//   addr 7  COUNT   [15:0] symbols sent [31:16] messages received (read only)
//
// Registers 1 to 5 may only be written while both directions are disabled
// and the modulator has finished its last burst; a write at any other time,
// or to a read-only register, is refused with resp_err. This is what lets
// the modulator and demodulator read the parameters across clock domains
// without handshakes; an assertion checks that the parameters never change
// unless the interface is idle. A write to the PLL register makes the PLL lock again.
// Status from the other clock domains arrives as levels or toggles through
// two-flop synchronizers; toggles are turned into counts here. Toggles are
// only counted once the PLL has been locked for two clocks, so that the first
// reset of the PLL clock domains, which happens when their clocks start, is
// not taken for events.
// That a CPU sets the modulation and PLL parameters and answers with a
// response signal is the design's; the register map is this implementation's.
module mdpcm_cpu
  import mdpcm_pkg::*;
(
  input  logic        clk,          // clk_in
  input  logic        rst_n,
  // control bus
  input  logic        ctrl_valid,
  input  logic        ctrl_we,
  input  logic [2:0]  ctrl_addr,
  input  logic [31:0] ctrl_wdata,
  output logic        resp_valid,
  output logic        resp_err,
  output logic [31:0] resp_rdata,
  // settings
  output mdpcm_cfg_t  cfg,
  output pll_cfg_t    pll_cfg,
  output logic        tx_en,
  output logic        rx_en,
  // responses from PLL, modulator and demodulator (asynchronous)
  input  logic        pll_locked,
  input  logic        tx_active,
  input  logic        tx_cfg_err,
  input  logic        tx_sent_tgl,
  input  logic        rx_active,
  input  logic        rx_cfg_err,
  input  logic        rx_tgl,
  input  logic        rx_end_tgl,
  input  logic        rx_ovf_tgl
);

  typedef enum logic [2:0] {
    A_CTRL = 3'd0, A_MAP = 3'd1, A_T_H0 = 3'd2, A_T_L = 3'd3,
    A_SLOT = 3'd4, A_PLL = 3'd5, A_STATUS = 3'd6, A_COUNT = 3'd7
  } addr_e;

  // ---- synchronizers ----
  logic locked_s, tx_act_s, tx_err_s, rx_act_s, rx_err_s;
  logic sent_s, rx_s, end_s, ovf_s;

  mdpcm_sync u_s0 (.clk(clk), .rst_n(rst_n), .d(pll_locked),  .q(locked_s));
  mdpcm_sync u_s1 (.clk(clk), .rst_n(rst_n), .d(tx_active),   .q(tx_act_s));
  mdpcm_sync u_s2 (.clk(clk), .rst_n(rst_n), .d(tx_cfg_err),  .q(tx_err_s));
  mdpcm_sync u_s3 (.clk(clk), .rst_n(rst_n), .d(rx_active),   .q(rx_act_s));
  mdpcm_sync u_s4 (.clk(clk), .rst_n(rst_n), .d(rx_cfg_err),  .q(rx_err_s));
  mdpcm_sync u_s5 (.clk(clk), .rst_n(rst_n), .d(tx_sent_tgl), .q(sent_s));
  mdpcm_sync u_s6 (.clk(clk), .rst_n(rst_n), .d(rx_tgl),      .q(rx_s));
  mdpcm_sync u_s7 (.clk(clk), .rst_n(rst_n), .d(rx_end_tgl),  .q(end_s));
  mdpcm_sync u_s8 (.clk(clk), .rst_n(rst_n), .d(rx_ovf_tgl),  .q(ovf_s));

  logic        sent_d, rx_d, end_d, ovf_d;
  logic        lock_d;     // locked_s one clock later
  logic        count_ok;   // PLL clocks have been running for two clocks
  logic [15:0] tx_count, rx_count;
  logic [7:0]  end_count, ovf_count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {sent_d, rx_d, end_d, ovf_d} <= '0;
      lock_d    <= 1'b0;
      count_ok  <= 1'b0;
      tx_count  <= '0;
      rx_count  <= '0;
      end_count <= '0;
      ovf_count <= '0;
    end else begin
      {sent_d, rx_d, end_d, ovf_d} <= {sent_s, rx_s, end_s, ovf_s};
      lock_d   <= locked_s;
      count_ok <= locked_s && lock_d;
      if (count_ok) begin
        if (sent_s != sent_d) tx_count  <= tx_count + 1'b1;
        if (rx_s   != rx_d)   rx_count  <= rx_count + 1'b1;
        if (end_s  != end_d)  end_count <= end_count + 1'b1;
        if (ovf_s  != ovf_d)  ovf_count <= ovf_count + 1'b1;
      end
    end
  end

  // ---- register file ----
  logic  idle;       // parameters may change
  addr_e addr;
  logic [31:0] rd;

  assign idle = !tx_en && !rx_en && !tx_act_s;
  assign addr = addr_e'(ctrl_addr);

  always_comb begin
    unique case (addr)
      A_CTRL:   rd = {30'd0, rx_en, tx_en};
      A_MAP:    rd = {23'd0, cfg.mode == MAP_GRAY, 4'd0, cfg.bits};
      A_T_H0:   rd = 32'(cfg.t_h0);
      A_T_L:    rd = 32'(cfg.t_l);
      A_SLOT:   rd = 32'(cfg.t_slot);
      A_PLL:    rd = {8'd0, pll_cfg.ls_div, pll_cfg.div, pll_cfg.mul};
      A_STATUS: rd = {8'd0, ovf_count, end_count, 3'd0, rx_err_s, tx_err_s,
                      locked_s, rx_act_s, tx_act_s};
      A_COUNT:  rd = {rx_count, tx_count};
      default:  rd = '0;
    endcase
  end

  logic wr, refuse;
  assign wr     = ctrl_valid && ctrl_we;
  assign refuse = wr && ((addr == A_STATUS) || (addr == A_COUNT) ||
                         ((addr != A_CTRL) && !idle));

  a_cfg_quiet: assert property (@(posedge clk) disable iff (!rst_n)
    !idle |=> $stable(cfg))
    else $error("parameters changed while the interface was in use");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg        <= '{mode: MAP_BINARY, bits: DEF_BITS, t_h0: DEF_T_H0,
                      t_l: DEF_T_L, t_slot: DEF_SLOT};
      pll_cfg    <= DEF_PLL;
      tx_en      <= 1'b0;
      rx_en      <= 1'b0;
      resp_valid <= 1'b0;
      resp_err   <= 1'b0;
      resp_rdata <= '0;
    end else begin
      resp_valid <= ctrl_valid;
      resp_err   <= refuse;
      resp_rdata <= rd;
      if (wr && !refuse) begin
        unique case (addr)
          A_CTRL: begin
            tx_en      <= ctrl_wdata[0];
            rx_en      <= ctrl_wdata[1];
            resp_rdata <= {30'd0, ctrl_wdata[1:0]};
          end
          A_MAP: begin
            cfg.bits   <= ctrl_wdata[3:0];
            cfg.mode   <= ctrl_wdata[8] ? MAP_GRAY : MAP_BINARY;
            resp_rdata <= {23'd0, ctrl_wdata[8], 4'd0, ctrl_wdata[3:0]};
          end
          A_T_H0: begin
            cfg.t_h0   <= ctrl_wdata[TIME_W-1:0];
            resp_rdata <= 32'(ctrl_wdata[TIME_W-1:0]);
          end
          A_T_L: begin
            cfg.t_l    <= ctrl_wdata[TIME_W-1:0];
            resp_rdata <= 32'(ctrl_wdata[TIME_W-1:0]);
          end
          A_SLOT: begin
            cfg.t_slot <= ctrl_wdata[SLOT_W-1:0];
            resp_rdata <= 32'(ctrl_wdata[SLOT_W-1:0]);
          end
          A_PLL: begin
            pll_cfg    <= '{mul: ctrl_wdata[7:0], div: ctrl_wdata[15:8],
                            ls_div: ctrl_wdata[23:16]};
            resp_rdata <= {8'd0, ctrl_wdata[23:0]};
          end
          default: ;
        endcase
      end
    end
  end

endmodule
