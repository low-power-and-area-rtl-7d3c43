// error_comp: compensation for the truncated low columns.
//
// The multiplier drops the W least significant columns of the partial
// product array. Their true contribution to column W is the carry out of
// the discarded columns, which would need an adder over all of them. This
// block replaces that carry by a single bit made from the most significant
// truncated column W-1 only:
//   comp = OR over r of pp[r][W-1-2r]     (for every row r reaching column W-1)
// For W = 4 this is comp = pp1[3] | pp2[1]. Against the exact carry
//   pp1[3]&pp2[1] | (pp1[3]^pp2[1]) & pp1[2] & pp2[0]
// the Karnaugh map is changed in the cells where exactly one of pp1[3],
// pp2[1] is 1; those extra ones add 2^W where the exact carry is 0 and so
// offset the downward bias of discarding the low columns. Building the
// compensation as a modified Karnaugh map of the truncated carry follows
// the design; this particular map is this design's own choice.
// comp has weight 2^W and enters the reduction tree in column W.
// With W = 0 nothing is truncated and comp is 0.
//
// Interface: pp[r] is the r-th partial product, unshifted (its bit k sits in
// product column k + 2r). Purely combinational.
module error_comp
  import tabm_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  logic [NPP-1:0][PW-1:0] pp,
  output logic                   comp
);

  always_comb begin
    comp = 1'b0;
    for (int r = 0; r < int'(NPP); r++) begin
      if (int'(W) - 1 - 2 * r >= 0) begin
        comp = comp | pp[r][int'(W) - 1 - 2 * r];
      end
    end
  end

endmodule
