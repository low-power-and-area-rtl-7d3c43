// tabm_pkg: shared constants and types of the truncated approximate radix-4
// Booth multiplier.
//
// The multiplier is signed N x N (N = 8), produces a 2N-bit product and has
// N/2 radix-4 Booth partial products. The selection signals that the Booth
// encoder sends to a partial product generator are bundled in booth_sel_t:
//   one : the digit is +-1 (select the multiplicand)
//   two : the digit is +-2 (select the multiplicand shifted left by one)
//   neg : the digit is negative (invert and add one)
// A digit of 0 has one = two = neg = 0.
package tabm_pkg;

  localparam int unsigned N   = 8;        // operand width
  localparam int unsigned NPP = N / 2;    // number of Booth partial products
  localparam int unsigned PW  = 2 * N;    // product / partial product width

  typedef struct packed {
    logic one;
    logic two;
    logic neg;
  } booth_sel_t;

endpackage
