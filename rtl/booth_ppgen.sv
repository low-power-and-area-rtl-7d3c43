// booth_ppgen: radix-4 Booth partial product generator for one digit.
//
// A booth_encoder turns the 3-bit multiplier group `code` into one/two/neg.
// The decoder row then forms, for each bit j of an (N+1)-bit row,
//   row[j] = (one & (a[j] ^ neg)) | (two & (a[j-1] ^ neg))
// (an AND-OR-22 per bit, with a[-1] = 0 and a[N] = a[N-1] for sign), i.e.
// the one's complement of +-1x / +-2x the multiplicand. The row is
// sign-extended to 2N bits and `neg` is added at bit 0, so `ppgen` is the
// complete two's complement partial product d * pp, not yet shifted to
// its weight 4^i. Forming the full word here (rather than passing a separate
// negation bit to the reduction tree) follows the partial products the
// design shows as 16-bit sign-extended words.
//
// Interface: `pp` is the multiplicand, `code` = {b(2i+1), b(2i), b(2i-1)}.
// Purely combinational.
module booth_ppgen #(
  parameter int unsigned N = tabm_pkg::N
) (
  input  logic [2:0]     code,
  input  logic [N-1:0]   pp,      // multiplicand
  output logic [2*N-1:0] ppgen    // d * multiplicand, two's complement
);

  tabm_pkg::booth_sel_t sel;
  logic [N:0]     a_ext;          // multiplicand sign-extended to N+1 bits
  logic [N:0]     row;            // one's complement decoder row
  logic [2*N-1:0] row_ext;

  booth_encoder u_enc (.code(code), .sel(sel));

  always_comb begin
    a_ext = {pp[N-1], pp};
    for (int j = 0; j <= N; j++) begin
      logic lo;
      lo     = (j == 0) ? 1'b0 : a_ext[j-1];
      row[j] = (sel.one & (a_ext[j] ^ sel.neg)) | (sel.two & (lo ^ sel.neg));
    end
    // A zero digit with neg cannot occur (encoder), so a zero row stays zero.
    row_ext = {{(N-1){row[N]}}, row};
    ppgen   = row_ext + {{(2*N-1){1'b0}}, sel.neg};
  end

endmodule
