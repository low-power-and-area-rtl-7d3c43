// tb_compressor_5_2: exhaustive self-checking test of the 5:2 compressor
// over all 128 input combinations. Checks the arithmetic identity
// I1+..+I5+cin1+cin2 = sum + 2*(carry+cout1+cout2), that cout1 and cout2
// follow their specified functions of I1..I5 only, and that sum is the odd
// parity of all seven inputs.
module tb_compressor_5_2;
  logic [4:0] i;
  logic cin1, cin2, sum, carry, cout1, cout2;
  int   checks = 0, failures = 0;

  compressor_5_2 dut (.i(i), .cin1(cin1), .cin2(cin2), .sum(sum), .carry(carry),
                      .cout1(cout1), .cout2(cout2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      int total, outv, n3, e_c1, e_c2;
      {cin2, cin1, i} = 7'(v);
      #1;
      n3    = int'(i[0]) + int'(i[1]) + int'(i[2]);
      total = n3 + int'(i[3]) + int'(i[4]) + int'(cin1) + int'(cin2);
      outv  = int'(sum) + 2 * (int'(carry) + int'(cout1) + int'(cout2));
      e_c1  = (n3 >= 2) ? 1 : 0;
      e_c2  = (i[3] == i[4]) ? int'(i[3]) : (n3 % 2);
      checks++;
      if (total != outv || int'(cout1) != e_c1 || int'(cout2) != e_c2 ||
          int'(sum) != (total % 2)) begin
        failures++;
        $display("FAIL in=%b sum=%b carry=%b cout1=%b cout2=%b", 7'(v), sum, carry, cout1, cout2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
