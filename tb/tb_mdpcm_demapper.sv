// Self-checking test of the anti-mapper: binary mode is the identity on the
// low b bits; gray mode matches the 3-bit table and undoes the mapper (a
// reference gray encoder in this bench) for every message and every b.
module tb_mdpcm_demapper;
  import mdpcm_pkg::*;

  int checks = 0, failures = 0;
  map_mode_e         mode;
  logic [BITS_W-1:0] bits;
  logic [MAX_B-1:0]  code, msg;

  mdpcm_demapper dut (.mode(mode), .bits(bits), .code(code), .msg(msg));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: mode=%0d b=%0d code=%0h msg=%0h", what, mode, bits, code, msg);
    end
  endtask

  // message -> code by the reflected-binary construction, bit by bit
  function automatic logic [MAX_B-1:0] ref_gray(int m, int b);
    logic [MAX_B-1:0] g = '0;
    for (int i = 0; i < b; i++) g[i] = ((m >> i) & 1) != ((m >> (i + 1)) & 1);
    return g;
  endfunction

  localparam logic [2:0] GRAY3 [8] = '{3'd0, 3'd1, 3'd3, 3'd2, 3'd6, 3'd7, 3'd5, 3'd4};

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = MAP_BINARY;
    for (int b = 1; b <= int'(MAX_B); b++) begin
      bits = BITS_W'(b);
      for (int k = 0; k < 50; k++) begin
        code = MAX_B'($urandom);
        #1ns;
        check(msg == (code & MAX_B'((1 << b) - 1)), "binary");
      end
    end
    mode = MAP_GRAY;
    bits = 3;
    for (int m = 0; m < 8; m++) begin
      code = MAX_B'(GRAY3[m]);
      #1ns;
      check(msg == MAX_B'(m), "gray table");
    end
    for (int b = 1; b <= int'(MAX_B); b++) begin
      bits = BITS_W'(b);
      for (int m = 0; m < (1 << b); m += (b > 10 ? 7 : 1)) begin
        code = ref_gray(m, b) | (MAX_B'($urandom) << b);
        #1ns;
        check(msg == MAX_B'(m), "gray inverse");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
