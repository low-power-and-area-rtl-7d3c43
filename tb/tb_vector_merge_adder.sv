// tb_vector_merge_adder: self-checking test of the final adder with random
// and corner operands, compared with the modulo-2^16 sum.
module tb_vector_merge_adder;
  logic [15:0] x, y, s;
  int   checks = 0, failures = 0;

  vector_merge_adder dut (.x(x), .y(y), .s(s));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      case (k)
        0: begin x = 16'hFFFF; y = 16'h0001; end
        1: begin x = 16'hFFFF; y = 16'hFFFF; end
        2: begin x = 16'h0000; y = 16'h0000; end
        3: begin x = 16'h7FFF; y = 16'h0001; end
        default: begin x = 16'($urandom); y = 16'($urandom); end
      endcase
      #1;
      checks++;
      if (s !== 16'(32'(x) + 32'(y))) begin
        failures++;
        if (failures < 10) $display("FAIL %h + %h = %h", x, y, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
