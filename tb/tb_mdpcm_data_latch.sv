// Self-checking test of the dual-clock data latch. A writer on a 7 ns clock
// and a reader on a 3 ns clock move 400 random words with random stalls on
// both sides; every word must arrive once and in order. It also checks that
// the latch refuses a write when DEPTH words wait, and that a word written
// into an empty latch is visible to the reader within three read clocks.
module tb_mdpcm_data_latch;
  localparam int W = 14;
  localparam int DEPTH = 2;

  int checks = 0, failures = 0;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wvalid = 0, wready, rvalid, rready = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] exp_q [$];
  int sent = 0, got = 0;
  bit reading = 0;

  always #3.5ns wclk = ~wclk;
  always #1.5ns rclk = ~rclk;

  mdpcm_data_latch #(.W(W), .DEPTH(DEPTH)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %t", what, $time);
    end
  endtask

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader: pops when reading is set, with random stalls
  always @(posedge rclk) begin
    if (rvalid && rready) begin
      check(exp_q.size() > 0, "unexpected word");
      if (exp_q.size() > 0) check(rdata == exp_q.pop_front(), "data order");
      got++;
    end
    rready <= reading && ($urandom % 3 != 0);
  end

  initial begin
    int waitc;
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    repeat (3) @(posedge wclk);
    // fill without reading: DEPTH words go in, then wready drops
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge wclk);
      check(wready, "room while not full");
      wvalid = 1; wdata = W'($urandom);
      @(posedge wclk);
      exp_q.push_back(wdata);
    end
    @(negedge wclk);
    wvalid = 0;
    @(negedge wclk);
    check(!wready, "full");
    // drain, then latency from empty
    reading = 1;
    wait (exp_q.size() == 0);
    repeat (5) @(posedge wclk);
    reading = 0;
    @(negedge wclk);
    wvalid = 1; wdata = 14'h1abc;
    @(posedge wclk); exp_q.push_back(wdata);
    #0.1ns wvalid = 0;
    waitc = 0;
    while (!rvalid) begin @(posedge rclk); #0.1ns; waitc++; end
    check(waitc <= 3, "latency from empty");
    reading = 1;
    // random stream
    while (sent < 400) begin
      @(negedge wclk);
      wvalid = ($urandom % 4 != 0);
      wdata  = W'($urandom);
      @(posedge wclk);
      if (wvalid && wready) begin exp_q.push_back(wdata); sent++; end
      #0.1ns wvalid = 0;
    end
    wait (exp_q.size() == 0);
    repeat (10) @(posedge rclk);
    check(got == 400 + DEPTH + 1, "word count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
