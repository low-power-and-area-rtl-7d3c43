// tb_compressor_4_2: exhaustive self-checking test of the exact 4:2
// compressor over all 32 input combinations. Checks the arithmetic identity
// x1+x2+x3+x4+cin = sum + 2*(carry+cout) and that cout is the majority of
// x1, x2, x3 (independent of cin, so no ripple along a compressor row).
module tb_compressor_4_2;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int   checks = 0, failures = 0;

  compressor_4_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                      .sum(sum), .carry(carry), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int total, outv, maj3;
      {cin, x4, x3, x2, x1} = 5'(v);
      #1;
      total = int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin);
      outv  = int'(sum) + 2 * (int'(carry) + int'(cout));
      maj3  = (int'(x1) + int'(x2) + int'(x3)) >= 2 ? 1 : 0;
      checks++;
      if (total != outv || int'(cout) != maj3) begin
        failures++;
        $display("FAIL in=%b sum=%b carry=%b cout=%b", 5'(v), sum, carry, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
