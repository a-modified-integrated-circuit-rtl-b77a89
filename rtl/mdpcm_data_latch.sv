// Data latch between the low-speed data bus and the high-speed MDPCM core.
//
// An MDPCM symbol lasts longer or shorter depending on the value it carries,
// so the bus side and the pulse side cannot run in lock step: a latch holds
// words between them. The same module serves as the input data latch of the
// modulator (bus clock clk_outT1 -> pulse clock clk_outT2) and as the output
// data latch of the demodulator (clk_outR2 -> clk_outR1).
//
// It is a small dual-clock FIFO: DEPTH words of W bits, binary pointers with
// one wrap bit, exchanged between the two clocks in gray code through
// two-flop synchronizers. Both sides use a valid/ready handshake; a word
// moves on a clock edge where valid and ready are both high. A written word
// becomes visible to the reader three read-clock edges later at most.
// Assertions state the handshake rules the FIFO keeps: it never holds more
// than DEPTH words, and a word offered on the read side stays offered,
// unchanged, until it is taken.
// The design only asks for a latch; the FIFO form, its depth and the
// handshake are choices of this implementation.
module mdpcm_data_latch #(
  parameter int unsigned W     = 14,
  parameter int unsigned DEPTH = 2     // a power of two, at least 2
) (
  // write side
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wvalid,
  output logic         wready,
  input  logic [W-1:0] wdata,
  // read side
  input  logic         rclk,
  input  logic         rrst_n,
  output logic         rvalid,
  input  logic         rready,
  output logic [W-1:0] rdata
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW:0]   wptr, rptr;            // binary, one wrap bit
  logic [AW:0]   wgray, rgray;          // gray copies, registered
  logic [AW:0]   wgray_m, wgray_s;      // write pointer in read domain
  logic [AW:0]   rgray_m, rgray_s;      // read pointer in write domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic [AW:0] rptr_w;
  assign rptr_w = gray2bin(rgray_s);
  assign wready = (wptr - rptr_w) != (AW+1)'(DEPTH);

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr  <= '0;
      wgray <= '0;
    end else if (wvalid && wready) begin
      wptr  <= wptr + 1'b1;
      wgray <= bin2gray(wptr + 1'b1);
    end
  end

  always_ff @(posedge wclk) begin
    if (wvalid && wready) mem[wptr[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      rgray_m <= '0;
      rgray_s <= '0;
    end else begin
      rgray_m <= rgray;
      rgray_s <= rgray_m;
    end
  end

  // ---------------- read side ----------------
  logic [AW:0] wptr_r;
  assign wptr_r = gray2bin(wgray_s);
  assign rvalid = wptr_r != rptr;
  assign rdata  = mem[rptr[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rptr  <= '0;
      rgray <= '0;
    end else if (rvalid && rready) begin
      rptr  <= rptr + 1'b1;
      rgray <= bin2gray(rptr + 1'b1);
    end
  end

  // ---------------- handshake rules ----------------
  // Checked only while both sides are out of reset: the two sides leave
  // reset at different times, each on its own clock.
  a_never_overfull: assert property (@(posedge wclk) disable iff (!wrst_n || !rrst_n)
    (wptr - rptr_w) <= (AW+1)'(DEPTH))
    else $error("data latch holds more than DEPTH words");

  a_read_stable: assert property (@(posedge rclk) disable iff (!rrst_n || !wrst_n)
    rvalid && !rready |=> rvalid && $stable(rdata))
    else $error("data latch withdrew or changed an offered word");

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      wgray_m <= '0;
      wgray_s <= '0;
    end else begin
      wgray_m <= wgray;
      wgray_s <= wgray_m;
    end
  end

endmodule
