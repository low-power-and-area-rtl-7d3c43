// booth_encoder: radix-4 (modified) Booth encoder for one digit.
//
// The three overlapping multiplier bits code = {b(2i+1), b(2i), b(2i-1)} stand
// for the digit d = -2*b(2i+1) + b(2i) + b(2i-1), which is one of -2..+2.
// The encoder turns them into the selection signals of the partial product
// generator:
//   one (X_i)  = b(2i) ^ b(2i-1)                        -> |d| = 1
//   two (2X_i) = (b(2i+1) ^ b(2i)) & ~(b(2i) ^ b(2i-1))  -> |d| = 2
//   neg        = b(2i+1) & ~(b(2i) & b(2i-1))            -> d < 0
// The X_i / 2X_i split follows the encoder/decoder pair the design uses; the
// neg term is qualified so that code 111 (d = 0) gives an all-zero row
// instead of an inverted one. That qualification is this design's choice.
//
// Interface: purely combinational, no clock.
module booth_encoder
  import tabm_pkg::*;
(
  input  logic [2:0]  code,   // {b(2i+1), b(2i), b(2i-1)}
  output booth_sel_t  sel
);

  logic x_odd;   // b(2i) ^ b(2i-1)
  logic x_even;  // b(2i+1) ^ b(2i)

  always_comb begin
    x_odd    = code[1] ^ code[0];
    x_even   = code[2] ^ code[1];
    sel.one  = x_odd;
    sel.two  = x_even & ~x_odd;
    sel.neg  = code[2] & ~(code[1] & code[0]);
  end

endmodule
