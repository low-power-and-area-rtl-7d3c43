// tb_ppgen: exhaustive self-checking test of the Booth partial product
// generator: every 3-bit code with every 8-bit multiplicand. The expected
// partial product is the Booth digit times the signed multiplicand, as a
// 16-bit two's complement word. Also checks the words shown for the design's
// example (code 001 with multiplicand 01011001 gives 0000000001011001).
module tb_ppgen;
  logic [2:0]  code;
  logic [7:0]  pp;
  logic [15:0] ppgen_o;
  int          checks = 0, failures = 0;

  booth_ppgen dut (.code(code), .pp(pp), .ppgen(ppgen_o));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      for (int a = -128; a < 128; a++) begin
        int d;
        logic [15:0] exp;
        code = 3'(c);
        pp   = 8'(a);
        #1;
        d   = -2 * int'(code[2]) + int'(code[1]) + int'(code[0]);
        exp = 16'(d * a);
        checks++;
        if (ppgen_o !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL code=%b a=%0d got=%h exp=%h", code, a, ppgen_o, exp);
        end
      end
    end
    code = 3'b001; pp = 8'b01011001; #1;
    checks++;
    if (ppgen_o !== 16'b0000000001011001) begin
      failures++; $display("FAIL example word %b", ppgen_o);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
