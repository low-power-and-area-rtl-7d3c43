// vector_merge_adder: final carry-propagate adder of the multiplier.
//
// Adds the sum row and the carry row left by the compressor tree,
// s = x + y modulo 2^WIDTH, with a ripple chain of full adders (carry-in 0,
// carry-out dropped). A carry-propagate adder at this point follows the
// design; the ripple-carry structure is this design's own choice.
// Interface: purely combinational.
module vector_merge_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  output logic [WIDTH-1:0] s
);

  logic [WIDTH:0] c;

  assign c[0] = 1'b0;

  for (genvar k = 0; k < WIDTH; k++) begin : g_fa
    full_adder u_fa (.a(x[k]), .b(y[k]), .c(c[k]), .sum(s[k]), .carry(c[k+1]));
  end

endmodule
