// tb_tabm_mul: end-to-end, full-size test of the truncated approximate
// Booth multiplier at its default parameters (8 x 8, W = 4).
//
// 1. The two worked examples of the design: -78 * 99 -> -7728 and
//    54 * 83 -> 4480, including the four partial product words of each.
// 2. All 65536 operand pairs, compared with a reference computed
//    independently of the RTL: the exact product a*b, minus the value of the
//    partial product bits that fall in the W discarded columns (each Booth
//    row taken as digit*a, computed with integer arithmetic), plus the
//    compensation bit (OR of the rows' bits in column W-1) times 2^W.
// It counts how often each mechanism occurs (compensation bit 0 and 1,
// every Booth digit value, a 5:2 horizontal carry cout2, an inexact result,
// an exact result) and counts a failure for one that never did. The mean
// relative error distance (MRED) over all nonzero products is printed.
module tb_tabm_mul;
  import tabm_pkg::*;

  localparam int WT = 4;   // default truncation factor of tabm_mul

  logic [7:0]  a, b;
  logic [15:0] op;
  int checks = 0, failures = 0;
  int n_comp1 = 0, n_comp0 = 0, n_cout2 = 0, n_inexact = 0, n_exact = 0;
  int n_digit[5];
  real mred_sum = 0.0;
  int  mred_n = 0;

  tabm_mul dut (.a(a), .b(b), .op(op));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digit(int bv, int i);
    int g = ((bv & 8'hFF) << 1) >> (2 * i);
    return -2 * ((g >> 2) & 1) + ((g >> 1) & 1) + (g & 1);
  endfunction

  function automatic int reference(int av, int bv, output logic cb);
    int low = 0;
    cb = 1'b0;
    for (int i = 0; i < 4; i++) begin
      int row = (digit(bv, i) * av) & 16'hFFFF;
      low += (row << (2 * i)) & ((1 << WT) - 1);
      if (WT - 1 - 2 * i >= 0) cb |= 1'((row >> (WT - 1 - 2 * i)) & 1);
    end
    return (av * bv - low + (int'(cb) << WT));
  endfunction

  task automatic check_example(int av, int bv, int expv, int p1, int p2, int p3, int p4);
    a = 8'(av); b = 8'(bv);
    #1;
    checks++;
    if ($signed(op) != expv) begin
      failures++;
      $display("FAIL example %0d*%0d: got %0d exp %0d", av, bv, $signed(op), expv);
    end
    checks++;
    if (dut.pp[0] !== 16'(p1) || dut.pp[1] !== 16'(p2) || dut.pp[2] !== 16'(p3) || dut.pp[3] !== 16'(p4)) begin
      failures++;
      $display("FAIL example %0d*%0d partial products %h %h %h %h", av, bv,
               dut.pp[0], dut.pp[1], dut.pp[2], dut.pp[3]);
    end
  endtask

  initial begin
    foreach (n_digit[k]) n_digit[k] = 0;

    check_example(-78, 99, -7728, 16'b0000000001001110, 16'b1111111110110010,
                  16'b0000000010011100, 16'b1111111101100100);
    check_example(54, 83, 4480, 16'b1111111111001010, 16'b0000000000110110,
                  16'b0000000000110110, 16'b0000000000110110);

    for (int av = -128; av < 128; av++) begin
      for (int bv = -128; bv < 128; bv++) begin
        logic cb;
        int   expv, got;
        a = 8'(av); b = 8'(bv);
        #1;
        expv = reference(av, bv, cb);
        got  = int'($signed(op));
        checks++;
        if (16'(got) !== 16'(expv)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d: got %0d exp %0d", av, bv, got, expv);
        end
        checks++;
        if (op[WT-1:0] !== '0 || dut.comp !== cb) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d: low bits %b comp %b", av, bv, op[WT-1:0], dut.comp);
        end
        if (dut.comp) n_comp1++; else n_comp0++;
        if (dut.u_red.c52_cout2) n_cout2++;
        if (got != av * bv) n_inexact++; else n_exact++;
        for (int i = 0; i < 4; i++) n_digit[digit(bv, i) + 2]++;
        if (av * bv != 0) begin
          mred_sum += real'((got > av * bv) ? got - av * bv : av * bv - got) /
                      real'((av * bv > 0) ? av * bv : -(av * bv));
          mred_n++;
        end
      end
    end

    $display("mechanisms: comp=1 %0d, comp=0 %0d, 5:2 cout2 %0d, inexact %0d, exact %0d",
             n_comp1, n_comp0, n_cout2, n_inexact, n_exact);
    $display("Booth digits -2..+2: %0d %0d %0d %0d %0d",
             n_digit[0], n_digit[1], n_digit[2], n_digit[3], n_digit[4]);
    $display("MRED over %0d nonzero products: %f %%", mred_n, 100.0 * mred_sum / real'(mred_n));
    if (n_comp1 == 0 || n_comp0 == 0 || n_cout2 == 0 || n_inexact == 0 || n_exact == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    foreach (n_digit[k]) if (n_digit[k] == 0) begin
      failures++;
      $display("FAIL Booth digit %0d never occurred", k - 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
