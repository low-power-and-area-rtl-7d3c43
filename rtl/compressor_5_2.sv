// compressor_5_2: exact 5:2 compressor with two horizontal carries.
//
// Adds five bits of one column, I1..I5 (i[0] = I1), and the two horizontal
// carries cin1, cin2 from the next lower column:
//   I1 + .. + I5 + cin1 + cin2 = sum + 2*(carry + cout1 + cout2).
// cout1 and cout2 depend only on I1..I5, so they never ripple:
//   cout1 = majority(I1, I2, I3)
//   cout2 = I4            if I4 == I5   (both 0 or both 1)
//         = I1 ^ I2 ^ I3  otherwise
//   sum   = I1 ^ I2 ^ I3 ^ I4 ^ I5 ^ cin1 ^ cin2
// carry is built from the intermediate signals X = I1^I2^I3, B = I4^I5 and
// C = cin1^cin2 with two multiplexers: the first passes 0 (C = 0) or X^B
// (C = 1), the second forces 1 when both carry-ins are 1 (NAND = 0):
//   carry = (cin1 & cin2) | ((cin1 ^ cin2) & (X ^ B)).
// The cout1/cout2/sum equations follow the design's 5:2 compressor truth
// table; the mux structure of carry follows its circuit.
// Interface: purely combinational.
module compressor_5_2 (
  input  logic [4:0] i,      // I1..I5
  input  logic       cin1,
  input  logic       cin2,
  output logic       sum,
  output logic       carry,
  output logic       cout1,
  output logic       cout2
);

  logic x, bb, c, cnand, mux1;

  always_comb begin
    x     = i[0] ^ i[1] ^ i[2];
    bb    = i[3] ^ i[4];
    c     = cin1 ^ cin2;
    cnand = ~(cin1 & cin2);
    cout1 = (i[0] & i[1]) | (i[0] & i[2]) | (i[1] & i[2]);
    cout2 = bb ? x : i[3];
    sum   = x ^ bb ^ c;
    mux1  = c ? (x ^ bb) : 1'b0;
    carry = cnand ? mux1 : 1'b1;
  end

endmodule
