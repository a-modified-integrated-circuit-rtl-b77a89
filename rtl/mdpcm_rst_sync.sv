// Reset synchronizer: asserts rst_out_n at once with rst_in_n and releases it
// two clk edges after rst_in_n is released, so that every clock domain of the
// interface leaves reset cleanly on its own clock.
module mdpcm_rst_sync (
  input  logic clk,
  input  logic rst_in_n,   // asynchronous reset, active low
  output logic rst_out_n   // reset for the clk domain, active low
);

  logic meta;

  always_ff @(posedge clk or negedge rst_in_n) begin
    if (!rst_in_n) begin
      meta      <= 1'b0;
      rst_out_n <= 1'b0;
    end else begin
      meta      <= 1'b1;
      rst_out_n <= meta;
    end
  end

endmodule
