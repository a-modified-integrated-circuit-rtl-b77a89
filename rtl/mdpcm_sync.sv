// Two-flop synchronizer for a single-bit level crossing into the clk domain.
// The output follows the input two clk edges later. Reset value is RST_VAL.
module mdpcm_sync #(
  parameter bit RST_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,     // asynchronous level
  output logic q      // synchronized level
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RST_VAL;
      q    <= RST_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
