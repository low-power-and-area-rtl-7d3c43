// tb_pp_reduction: self-checking test of truncation plus compressor
// reduction for W = 4 (default) and W = 0. Random partial product words and
// compensation bits are applied; the expected value of sum_row + carry_row
// is the sum of the rows shifted to weight 4^r with columns below W cleared,
// plus comp * 2^W, modulo 2^16. Also checks that both rows are zero below W.
module tb_pp_reduction;
  import tabm_pkg::*;

  logic [NPP-1:0][PW-1:0] pp;
  logic comp;
  logic [PW-1:0] s4, c4, s0, c0;
  int   checks = 0, failures = 0;

  pp_reduction          dut4 (.pp(pp), .comp(comp), .sum_row(s4), .carry_row(c4));
  pp_reduction #(.W(0)) dut0 (.pp(pp), .comp(1'b0), .sum_row(s0), .carry_row(c0));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [PW-1:0] expect_sum(int w, logic cb);
    logic [PW-1:0] acc = '0;
    logic [PW-1:0] mask = ~((PW'(1) << w) - 1);
    for (int r = 0; r < int'(NPP); r++) acc += (pp[r] << (2 * r)) & mask;
    acc += PW'(cb) << w;
    return acc;
  endfunction

  initial begin
    for (int k = 0; k < 5000; k++) begin
      for (int r = 0; r < int'(NPP); r++) pp[r] = 16'($urandom);
      comp = 1'($urandom);
      if (k < 4) begin        // corner patterns: all zeros / all ones
        for (int r = 0; r < int'(NPP); r++) pp[r] = (k[0]) ? '1 : '0;
        comp = k[1];
      end
      #1;
      checks++;
      if (PW'(s4 + c4) !== expect_sum(4, comp) || s4[3:0] !== 4'd0 || c4[3:0] !== 4'd0) begin
        failures++;
        if (failures < 10) $display("FAIL W=4 k=%0d got=%h exp=%h", k, PW'(s4 + c4), expect_sum(4, comp));
      end
      checks++;
      if (PW'(s0 + c0) !== expect_sum(0, 1'b0)) begin
        failures++;
        if (failures < 10) $display("FAIL W=0 k=%0d got=%h exp=%h", k, PW'(s0 + c0), expect_sum(0, 1'b0));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
