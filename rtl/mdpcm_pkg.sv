// Shared types and constants of the M-ary digital pulse cycle modulation
// (MDPCM) interface.
//
// An MDPCM symbol carrying message m is one pulse period: the line is high for
// t_H0, low for t_L, and then low for another (c+1) slot times, where c is m
// itself (binary mapping) or the gray code of m (gray mapping). The symbol
// period is therefore T = t_BS + (c+1)*t_slot with t_BS = t_H0 + t_L, and the
// receiver recovers m from the distance between two rising edges.
//
// All durations are held as counts of the high-speed reference clock
// (clk_outT2 on the transmit side, clk_outR2 on the receive side). The default
// numbers follow the demonstration set-up of the design: t_H0 = t_L = 3 us,
// t_slot = 6 ns and b = 9 bits per symbol, with a 500 MHz high-speed clock so
// that one slot is 3 clock periods (a choice of this implementation that lets
// the receiver absorb the +-1 count error of an asynchronous counter).
package mdpcm_pkg;

  // Largest number of bits per symbol the bus and counters are built for
  // (the bandwidth-efficiency study sweeps b up to 14).
  localparam int unsigned MAX_B  = 14;
  // Width of the t_H0 / t_L registers, in high-speed clock periods.
  localparam int unsigned TIME_W = 16;
  // Width of the t_slot register, in high-speed clock periods.
  localparam int unsigned SLOT_W = 8;
  // Width of the bits-per-symbol field (holds 1 .. MAX_B).
  localparam int unsigned BITS_W = 4;

  // Reset values of the parameter registers.
  localparam logic [TIME_W-1:0] DEF_T_H0  = TIME_W'(1500); // 3 us at 500 MHz
  localparam logic [TIME_W-1:0] DEF_T_L   = TIME_W'(1500); // 3 us at 500 MHz
  localparam logic [SLOT_W-1:0] DEF_SLOT  = SLOT_W'(3);    // 6 ns at 500 MHz
  localparam logic [BITS_W-1:0] DEF_BITS  = BITS_W'(9);    // M = 512

  typedef enum logic {
    MAP_BINARY = 1'b0,
    MAP_GRAY   = 1'b1
  } map_mode_e;

  // Modulation parameters, shared by modulator and demodulator.
  typedef struct packed {
    map_mode_e         mode;   // binary or gray mapping
    logic [BITS_W-1:0] bits;   // b, bits per symbol, M = 2**b
    logic [TIME_W-1:0] t_h0;   // high time of every symbol, clock periods
    logic [TIME_W-1:0] t_l;    // low time of the base symbol, clock periods
    logic [SLOT_W-1:0] t_slot; // slot length, clock periods
  } mdpcm_cfg_t;

  // PLL settings: f_hs = f_in * mul / div, f_ls = f_in / ls_div.
  typedef struct packed {
    logic [7:0] mul;
    logic [7:0] div;
    logic [7:0] ls_div;
  } pll_cfg_t;

  localparam pll_cfg_t DEF_PLL = '{mul: 8'd10, div: 8'd1, ls_div: 8'd10};

  // A parameter set is usable if every duration is non-zero and b fits.
  function automatic logic cfg_ok(mdpcm_cfg_t c);
    return (c.bits != '0) && (c.bits <= BITS_W'(MAX_B)) &&
           (c.t_h0 != '0) && (c.t_l != '0) && (c.t_slot != '0);
  endfunction

  // Mask keeping the low b bits of a message.
  function automatic logic [MAX_B-1:0] bits_mask(logic [BITS_W-1:0] b);
    return MAX_B'((15'(1) << b) - 15'(1));
  endfunction

endpackage
