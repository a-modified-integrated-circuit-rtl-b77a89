// MDPCM recognizer: measures the pulse period on the line and decides which
// slot code it carries.
//
// The line is brought into the clk_outR2 domain through two flip-flops and
// only its rising edges are used, so a slow falling edge does not matter.
// A counter runs from one rising edge to the next. The decision is the
// maximum-likelihood one: the nominal period t_BS + (c+1)*t_slot nearest to
// the measured period T_x, i.e. code c is chosen when
//   t_BS + (c+1/2)*t_slot <= T_x < t_BS + (c+3/2)*t_slot,
// with everything shorter taken as c = 0. Rather than divide, the counter
// waits until T_x reaches the first boundary, t_BS + t_slot + ceil(t_slot/2),
// and then counts boundaries passed once per t_slot; at the next rising edge
// the count is the code. A period reaching t_BS + M*t_slot + ceil(t_slot/2)
// has no valid code: the recognizer then drops back to idle ("no valid
// waveform") and counts an end of burst, and the next rising edge only starts
// a new measurement. The first edge after idle therefore never yields a code.
//
// With t_slot of 3 or more clock periods a +-1 clock error in T_x, as left
// by the asynchronous sampling of the line, cannot change the decision.
//
// Interface: code_valid pulses for one cycle with code, three clk_outR2
// edges after the rising edge on rx_in that ended the period. burst_end
// pulses for one cycle when a period times out. cfg must not change while
// run is high. The decision rule is the design's; the boundary-counting form,
// the timeout and the synchronizer are choices of this implementation.
module mdpcm_recognizer
  import mdpcm_pkg::*;
(
  input  logic             clk,        // clk_outR2
  input  logic             rst_n,
  input  logic             run,
  input  mdpcm_cfg_t       cfg,
  input  logic             rx_in,      // interface input, asynchronous
  output logic             code_valid,
  output logic [MAX_B-1:0] code,
  output logic             burst_end,
  output logic             active      // a measurement is in progress
);

  logic        rx_s;      // synchronized line
  logic        rx_d;      // previous sample
  logic        rise;

  mdpcm_sync u_sync (.clk(clk), .rst_n(rst_n), .d(rx_in), .q(rx_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx_d <= 1'b0;
    else        rx_d <= rx_s;
  end
  assign rise = rx_s && !rx_d;

  // first boundary, measured from the rising edge, minus one
  logic [TIME_W+1:0] first_wait;
  assign first_wait = (TIME_W+2)'(cfg.t_h0) + (TIME_W+2)'(cfg.t_l)
                    + (TIME_W+2)'(cfg.t_slot)
                    + (((TIME_W+2)'(cfg.t_slot) + 1'b1) >> 1) - 1'b1;

  logic [TIME_W+1:0] wait_cnt;  // cycles until the next boundary
  logic [MAX_B:0]    passed;    // boundaries passed before this cycle
  logic [MAX_B:0]    passed_now;
  logic [MAX_B:0]    m_val;
  logic              at_bound;
  logic              too_long;

  assign m_val      = (MAX_B+1)'(16'(1) << cfg.bits);
  assign at_bound   = active && (wait_cnt == '0);
  assign passed_now = passed + (MAX_B+1)'(at_bound);
  assign too_long   = passed_now >= m_val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      wait_cnt   <= '0;
      passed     <= '0;
      code_valid <= 1'b0;
      code       <= '0;
      burst_end  <= 1'b0;
    end else begin
      code_valid <= 1'b0;
      burst_end  <= 1'b0;
      if (!run) begin
        active <= 1'b0;
      end else if (rise) begin
        // a rising edge ends one period and starts the next
        if (active && !too_long) begin
          code_valid <= 1'b1;
          code       <= passed_now[MAX_B-1:0];
        end
        active   <= 1'b1;
        wait_cnt <= first_wait;
        passed   <= '0;
      end else if (active) begin
        if (too_long) begin
          active    <= 1'b0;
          burst_end <= 1'b1;
        end else if (at_bound) begin
          passed   <= passed_now;
          wait_cnt <= (TIME_W+2)'(cfg.t_slot) - 1'b1;
        end else begin
          wait_cnt <= wait_cnt - 1'b1;
        end
      end
    end
  end

endmodule
