// pp_reduction: truncation and compressor reduction of the partial products.
//
// The four partial products pp[r] (unshifted, two's complement, 2N bits)
// are placed at weight 4^r, so product column j holds the bits
// pp[r][j-2r] for every r with j-2r >= 0 (one bit in columns 0-1, up to
// four in columns 6 and above). Columns 0..W-1 are discarded (truncation).
// The remaining columns are reduced to two rows by one chain of compressors:
//   column W   : a 5:2 compressor takes the pp bits of the column and the
//                compensation bit `comp` (I4); cin1 = cin2 = 0.
//                With both carry-ins 0 this cell's carry output is always
//                0: its weight-2 share leaves through cout1 and cout2.
//   column W+1 : a 4:2 compressor takes the (at most three) pp bits of the
//                column, cout2 of column W as x4 and cout1 of column W as
//                cin.
//   columns W+2 .. 2N-1 : 4:2 compressors with all four pp bits, chained
//                through cout -> cin.
// Each compressor's sum is sum_row[j], its carry is carry_row[j+1]; the
// cout of the top column and carries above bit 2N-1 are dropped, which is
// the modulo-2^2N wrap of two's complement arithmetic. Because the upper
// columns already hold four pp bits, a compressor's carry cannot join the
// next column's compressor as an extra input; it is collected in carry_row
// and added by the vector merge adder instead. sum_row and
// carry_row are zero below column W. The use of exact 4:2 and 5:2
// compressors above the truncated part follows the design; this particular
// placement of the cells is this design's own choice. It needs column W+1 to
// hold no more than three pp bits, so W may be 0..4.
//
// Interface: purely combinational; sum_row + carry_row is the product
// (without the discarded columns) modulo 2^PW.
module pp_reduction
  import tabm_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  logic [NPP-1:0][PW-1:0] pp,
  input  logic                   comp,
  output logic [PW-1:0]          sum_row,
  output logic [PW-1:0]          carry_row
);

  // col[j][r]: bit of row r in product column j (0 where the row has none)
  logic [PW-1:0][NPP-1:0] col;
  logic [PW:0]            carry_w;   // carry outputs, carry_w[j+1] from column j
  logic [PW-1:0]          sum_w;
  logic [PW:0]            chain;     // 4:2 cout chain, chain[j+1] from column j
  logic                   c52_cout1, c52_cout2;

  always_comb begin
    for (int j = 0; j < int'(PW); j++) begin
      for (int r = 0; r < int'(NPP); r++) begin
        col[j][r] = (j - 2 * r >= 0) ? pp[r][j - 2 * r] : 1'b0;
      end
    end
  end

  if (W > 4) begin : g_bad_w
    $error("pp_reduction: W must be 0..4 for this compressor placement");
  end

  // Column W: 5:2 compressor, the compensation bit joins here.
  compressor_5_2 u_c52 (
    .i    ({col[W][3], comp, col[W][2], col[W][1], col[W][0]}),
    .cin1 (1'b0),
    .cin2 (1'b0),
    .sum  (sum_w[W]),
    .carry(carry_w[W+1]),
    .cout1(c52_cout1),
    .cout2(c52_cout2)
  );

  // Column W+1: 4:2 compressor absorbing both horizontal carries of the 5:2.
  compressor_4_2 u_c42_first (
    .x1   (col[W+1][0]),
    .x2   (col[W+1][1]),
    .x3   (col[W+1][2]),
    .x4   (c52_cout2),
    .cin  (c52_cout1),
    .sum  (sum_w[W+1]),
    .carry(carry_w[W+2]),
    .cout (chain[W+2])
  );

  // Columns W+2 .. PW-1: exact 4:2 compressor chain.
  for (genvar j = W + 2; j < PW; j++) begin : g_c42
    compressor_4_2 u_c42 (
      .x1   (col[j][0]),
      .x2   (col[j][1]),
      .x3   (col[j][2]),
      .x4   (col[j][3]),
      .cin  (chain[j]),
      .sum  (sum_w[j]),
      .carry(carry_w[j+1]),
      .cout (chain[j+1])
    );
  end

  // Unused low positions of the internal vectors.
  for (genvar j = 0; j < W; j++) begin : g_trunc
    assign sum_w[j] = 1'b0;
  end
  for (genvar j = 0; j <= W; j++) begin : g_trunc_c
    assign carry_w[j] = 1'b0;
  end
  for (genvar j = 0; j <= W + 1; j++) begin : g_trunc_ch
    assign chain[j] = 1'b0;
  end

  assign sum_row   = sum_w;
  assign carry_row = carry_w[PW-1:0];

endmodule
