// Data mapper of the MDPCM modulator.
//
// Turns a message m into the slot code c that sets the symbol period
// T = t_BS + (c+1)*t_slot. With binary mapping c = m; with gray mapping
// c = m ^ (m >> 1), so that messages whose periods differ by one slot differ
// in one bit and a one-slot timing error costs a single bit error. Only the
// low b bits of the message are used; the rest are cleared.
//
// Purely combinational: the code is valid in the same cycle as the message.
// The two mapping rules are the design's; masking to b bits and the
// combinational form are choices of this implementation.
module mdpcm_mapper
  import mdpcm_pkg::*;
(
  input  map_mode_e         mode,  // binary or gray
  input  logic [BITS_W-1:0] bits,  // b
  input  logic [MAX_B-1:0]  msg,   // message from the input data latch
  output logic [MAX_B-1:0]  code   // slot code for the generator
);

  logic [MAX_B-1:0] m;

  always_comb begin
    m = msg & bits_mask(bits);
    if (mode == MAP_GRAY) code = m ^ (m >> 1);
    else                  code = m;
  end

endmodule
