// Self-checking test of the data mapper: binary mapping is the identity on
// the low b bits; gray mapping matches the 3-bit reflected gray table, maps
// neighbouring messages to codes one bit apart and is a one-to-one map onto
// the b-bit codes. Every b from 1 to MAX_B is covered.
module tb_mdpcm_mapper;
  import mdpcm_pkg::*;

  int checks = 0, failures = 0;
  map_mode_e         mode;
  logic [BITS_W-1:0] bits;
  logic [MAX_B-1:0]  msg, code;

  mdpcm_mapper dut (.mode(mode), .bits(bits), .msg(msg), .code(code));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s t=%0t: mode=%0d b=%0d msg=%0h code=%0h", what, $time, mode, bits, msg, code);
    end
  endtask

  localparam logic [2:0] GRAY3 [8] = '{3'd0, 3'd1, 3'd3, 3'd2, 3'd6, 3'd7, 3'd5, 3'd4};

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MAX_B-1:0] prev;
    bit seen [logic [MAX_B-1:0]];
    // binary mapping, with junk above bit b
    mode = MAP_BINARY;
    #1ns;
    for (int b = 1; b <= int'(MAX_B); b++) begin
      bits = BITS_W'(b);
      for (int k = 0; k < 50; k++) begin
        msg = MAX_B'($urandom);
        #1ns;
        check(code == (msg & MAX_B'((1 << b) - 1)), "binary");
      end
    end
    // gray table
    mode = MAP_GRAY;
    bits = 3;
    for (int m = 0; m < 8; m++) begin
      msg = MAX_B'(m) | MAX_B'(8 * ($urandom % 100));
      #1ns;
      check(code == MAX_B'(GRAY3[m]), "gray table");
    end
    // one-bit steps and bijection
    for (int b = 1; b <= int'(MAX_B); b++) begin
      bits = BITS_W'(b);
      seen.delete();
      for (int m = 0; m < (1 << b); m++) begin
        msg = MAX_B'(m);
        #1ns;
        check(32'(code) < (32'd1 << b), "gray range");
        check(!seen.exists(code), "gray unique");
        seen[code] = 1'b1;
        if (m > 0) check($countones(code ^ prev) == 1, "gray step");
        prev = code;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
