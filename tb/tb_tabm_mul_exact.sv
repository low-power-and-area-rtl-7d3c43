// tb_tabm_mul_exact: the multiplier with truncation switched off (W = 0),
// which must give the exact signed product for all 65536 operand pairs.
// Also runs the worked examples of the exact multiplier: -1*-1 = 1,
// -106*53 = -5618 (partial products -106, -106, 106, -106) and
// 43*73 = 3139 (partial products 43, -86, 43, 43), and -103*53, 89*39.
module tb_tabm_mul_exact;
  logic [7:0]  a, b;
  logic [15:0] op;
  int checks = 0, failures = 0;

  tabm_mul #(.W(0)) dut (.a(a), .b(b), .op(op));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_pp(int av, int bv, int p1, int p2, int p3, int p4);
    a = 8'(av); b = 8'(bv);
    #1;
    checks++;
    if (dut.pp[0] !== 16'(p1) || dut.pp[1] !== 16'(p2) || dut.pp[2] !== 16'(p3) || dut.pp[3] !== 16'(p4)) begin
      failures++;
      $display("FAIL %0d*%0d partial products %h %h %h %h", av, bv, dut.pp[0], dut.pp[1], dut.pp[2], dut.pp[3]);
    end
  endtask

  initial begin
    check_pp(-106, 53, -106, -106, 106, -106);
    check_pp(43, 73, 43, -86, 43, 43);
    check_pp(-103, 53, -103, -103, 103, -103);
    check_pp(89, 39, -89, 178, -178, 89);
    check_pp(-1, -1, 1, 0, 0, 0);
    for (int av = -128; av < 128; av++) begin
      for (int bv = -128; bv < 128; bv++) begin
        a = 8'(av); b = 8'(bv);
        #1;
        checks++;
        if (op !== 16'(av * bv)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d: got %0d", av, bv, $signed(op));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
