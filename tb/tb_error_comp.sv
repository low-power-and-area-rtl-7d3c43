// tb_error_comp: self-checking test of the compensation bit for truncation
// factors 4 (default), 2 and 0. Random partial product words are applied;
// the expected bit is the OR of the bits each row places in column W-1
// (pp1[3] | pp2[1] for W = 4, pp1[1] for W = 2, always 0 for W = 0).
// All 16 combinations of pp1[3:2], pp2[1:0] are also swept for W = 4.
module tb_error_comp;
  import tabm_pkg::*;

  logic [NPP-1:0][PW-1:0] pp;
  logic comp4, comp2, comp0;
  int   checks = 0, failures = 0;

  error_comp           dut4 (.pp(pp), .comp(comp4));
  error_comp #(.W(2))  dut2 (.pp(pp), .comp(comp2));
  error_comp #(.W(0))  dut0 (.pp(pp), .comp(comp0));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    checks++;
    if (comp4 !== (pp[0][3] | pp[1][1]) || comp2 !== pp[0][1] || comp0 !== 1'b0) begin
      failures++;
      $display("FAIL pp0=%h pp1=%h comp4=%b comp2=%b comp0=%b", pp[0], pp[1], comp4, comp2, comp0);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int r = 0; r < int'(NPP); r++) pp[r] = 16'($urandom);
      pp[0][3:2] = 2'(v >> 2);
      pp[1][1:0] = 2'(v);
      check();
    end
    for (int k = 0; k < 1000; k++) begin
      for (int r = 0; r < int'(NPP); r++) pp[r] = 16'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
