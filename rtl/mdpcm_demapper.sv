// Anti-mapper of the MDPCM demodulator.
//
// Inverse of the data mapper: turns the decided slot code c back into the
// message m. With binary mapping m = c; with gray mapping each message bit is
// the XOR of the code bits at and above it (m[i] = ^c[MAX_B-1:i]). The code is
// first cut to its low b bits.
//
// Purely combinational. The mapping rules are the design's; the form of the
// gray decoder is a choice of this implementation.
module mdpcm_demapper
  import mdpcm_pkg::*;
(
  input  map_mode_e         mode,  // binary or gray
  input  logic [BITS_W-1:0] bits,  // b
  input  logic [MAX_B-1:0]  code,  // slot code from the recognizer
  output logic [MAX_B-1:0]  msg    // message for the output data latch
);

  logic [MAX_B-1:0] c;

  always_comb begin
    c = code & bits_mask(bits);
    if (mode == MAP_GRAY) begin
      msg[MAX_B-1] = c[MAX_B-1];
      for (int i = MAX_B - 2; i >= 0; i--) msg[i] = msg[i+1] ^ c[i];
    end else begin
      msg = c;
    end
  end

endmodule
