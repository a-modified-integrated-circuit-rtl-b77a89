// MDPCM generator: turns slot codes into the pulse waveform on the line.
//
// Each symbol is one period of the line: high for t_H0 clock periods, then
// low for t_L periods, then low for (c+1) slots of t_slot periods each, so
// T = t_H0 + t_L + (c+1)*t_slot. The receiver measures T between rising
// edges, so a symbol only ends when the next rising edge starts. Symbols are
// sent back to back while codes are offered. When none is waiting at the end
// of a symbol, the generator sends a closing high pulse of t_H0 (its rising
// edge ends the last symbol) and then holds the line low for a guard time of
// t_L + (M+2)*t_slot, longer than any valid period, so that the receiver
// sees the burst end before the next burst begins. A code offered while the
// closing pulse is high is sent as a normal symbol with that pulse as its
// start.
//
// Interface: code_valid/code_ready handshake (code taken on a clock edge
// where both are high), run enables new bursts, sent pulses for one cycle
// when a symbol's period is complete, busy is high outside the idle state.
// cfg must not change while busy. The waveform is the design's; the closing
// pulse and guard time are this implementation's way of ending a burst.
module mdpcm_generator
  import mdpcm_pkg::*;
(
  input  logic             clk,         // clk_outT2
  input  logic             rst_n,
  input  logic             run,         // allowed to start a burst
  input  mdpcm_cfg_t       cfg,
  input  logic             code_valid,
  output logic             code_ready,
  input  logic [MAX_B-1:0] code,
  output logic             tx_out,      // interface output
  output logic             sent,        // one symbol period completed
  output logic             busy
);

  typedef enum logic [1:0] {S_IDLE, S_HIGH, S_LOW, S_SLOTS} state_e;

  state_e            state;
  logic [TIME_W-1:0] cnt;        // cycles left in HIGH / LOW, minus one
  logic [SLOT_W-1:0] sub;        // cycles left in the current slot, minus one
  logic [MAX_B:0]    slots;      // slots left after the current one
  logic              have;       // a symbol is loaded for this period
  logic              guard;      // the low phase is the end-of-burst guard

  logic take_idle, take_high, take_end;
  logic slot_end, sym_end;

  assign slot_end  = (state == S_SLOTS) && (sub == '0);
  assign sym_end   = slot_end && (slots == '0);
  assign take_idle = (state == S_IDLE) && run && code_valid;
  assign take_high = (state == S_HIGH) && (cnt == '0) && !have && run && code_valid;
  assign take_end  = sym_end && !guard && run && code_valid;
  assign code_ready = take_idle || take_high || take_end;

  assign tx_out = (state == S_HIGH);
  assign busy   = (state != S_IDLE);
  assign sent   = sym_end && !guard;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      sub   <= '0;
      slots <= '0;
      have  <= 1'b0;
      guard <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (take_idle) begin
            state <= S_HIGH;
            cnt   <= cfg.t_h0 - 1'b1;
            slots <= {1'b0, code};
            have  <= 1'b1;
            guard <= 1'b0;
          end
        end
        S_HIGH: begin
          if (cnt != '0) begin
            cnt <= cnt - 1'b1;
          end else begin
            state <= S_LOW;
            cnt   <= cfg.t_l - 1'b1;
            if (have || take_high) begin
              if (take_high) slots <= {1'b0, code};
              guard <= 1'b0;
            end else begin
              // closing pulse: hold the line low for t_L + (M+2) slots
              slots <= (MAX_B+1)'((16'(1) << cfg.bits) + 16'd1);
              guard <= 1'b1;
            end
            have <= 1'b0;
          end
        end
        S_LOW: begin
          if (cnt != '0) begin
            cnt <= cnt - 1'b1;
          end else begin
            state <= S_SLOTS;
            sub   <= cfg.t_slot - 1'b1;
          end
        end
        S_SLOTS: begin
          if (sub != '0) begin
            sub <= sub - 1'b1;
          end else if (slots != '0) begin
            slots <= slots - 1'b1;
            sub   <= cfg.t_slot - 1'b1;
          end else if (guard) begin
            state <= S_IDLE;
            guard <= 1'b0;
          end else begin
            // the next rising edge closes this symbol
            state <= S_HIGH;
            cnt   <= cfg.t_h0 - 1'b1;
            have  <= take_end;
            if (take_end) slots <= {1'b0, code};
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
