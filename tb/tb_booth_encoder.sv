// tb_booth_encoder: exhaustive self-checking test of the radix-4 Booth
// encoder. For each of the 8 codes the expected digit
// d = -2*b(2i+1) + b(2i) + b(2i-1) is computed arithmetically and the
// outputs are compared with |d| == 1, |d| == 2 and d < 0.
module tb_booth_encoder;
  import tabm_pkg::*;

  logic [2:0]  code;
  booth_sel_t  sel;
  int          checks = 0, failures = 0;

  booth_encoder dut (.code(code), .sel(sel));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      int d;
      code = 3'(c);
      #1;
      d = -2 * int'(code[2]) + int'(code[1]) + int'(code[0]);
      checks++;
      if (sel.one !== (d == 1 || d == -1) || sel.two !== (d == 2 || d == -2) ||
          sel.neg !== (d < 0)) begin
        failures++;
        $display("FAIL code=%b d=%0d one=%b two=%b neg=%b", code, d, sel.one, sel.two, sel.neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
