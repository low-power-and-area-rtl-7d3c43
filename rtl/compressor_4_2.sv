// compressor_4_2: exact 4:2 compressor.
//
// Adds four bits of one column, x1..x4, and the horizontal carry cin from the
// next lower column:  x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout).
// Two full adders are chained: the first adds x1, x2, x3 and gives cout,
// which goes to the cin of the next higher column's compressor; the second
// adds the first adder's sum, x4 and cin and gives sum and carry. cout does
// not depend on cin, so a row of these cells has no carry ripple beyond one
// cell. In closed form:
//   sum   = x1 ^ x2 ^ x3 ^ x4 ^ cin
//   cout  = (x1 ^ x2) ? x3 : x1
//   carry = (x1 ^ x2 ^ x3 ^ x4) ? cin : x4
// All of this follows the design's exact 4:2 compressor.
// Interface: purely combinational.
module compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);

  logic s1;

  full_adder u_fa1 (.a(x1), .b(x2), .c(x3),  .sum(s1),  .carry(cout));
  full_adder u_fa2 (.a(s1), .b(x4), .c(cin), .sum(sum), .carry(carry));

endmodule
