// tabm_mul: signed 8 x 8 truncated approximate radix-4 Booth multiplier with
// error compensation and compressor-based reduction.
//
// Datapath (all combinational):
//   1. Partial product generation: the multiplier b is recoded into four
//      radix-4 Booth digits d_i in {-2..+2} from the groups
//      {b[2i+1], b[2i], b[2i-1]} (b[-1] = 0); booth_ppgen i outputs d_i * a as a
//      16-bit two's complement word (pp1..pp4 = pp[0..3]).
//   2. Truncation and compensation: the W least significant product columns
//      are not computed; error_comp derives one compensation bit of weight
//      2^W from the most significant discarded column.
//   3. Compression: pp_reduction reduces columns W..15 to a sum row and a
//      carry row with one 5:2 compressor (column W, takes the compensation
//      bit) and a chain of exact 4:2 compressors.
//   4. Vector merge: a carry-propagate adder adds the two rows.
// op[W-1:0] is always 0. With W = 0 the multiplier is exact.
// The four stages and the use of truncation with a compensation circuit,
// modified Booth encoding and 4:2 / 5:2 compressors follow the design; the
// compensation function and the placement of the compressors are this
// design's own choices (see error_comp and pp_reduction).
//
// Interface: a = multiplicand, b = multiplier, both two's complement;
// op = approximate a*b, 16-bit two's complement. No clock, no reset.
module tabm_mul
  import tabm_pkg::*;
#(
  parameter int unsigned W = 4     // truncation factor: discarded low columns
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  output logic [PW-1:0] op
);

  logic [N:0]            b_ext;      // {b, 1'b0}: b[-1] = 0
  logic [NPP-1:0][PW-1:0] pp;
  logic                  comp;
  logic [PW-1:0]         sum_row, carry_row;

  assign b_ext = {b, 1'b0};

  for (genvar i = 0; i < NPP; i++) begin : g_pp
    booth_ppgen #(.N(N)) u_ppgen (
      .code (b_ext[2*i+2 -: 3]),
      .pp   (a),
      .ppgen(pp[i])
    );
  end

  error_comp #(.W(W)) u_comp (.pp(pp), .comp(comp));

  pp_reduction #(.W(W)) u_red (
    .pp       (pp),
    .comp     (comp),
    .sum_row  (sum_row),
    .carry_row(carry_row)
  );

  vector_merge_adder #(.WIDTH(PW)) u_vma (.x(sum_row), .y(carry_row), .s(op));

endmodule
