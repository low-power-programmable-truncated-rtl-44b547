// ptm_ppgen -- programmable partial-product generator.
//
// Builds the N x N partial-product matrix of a two's complement multiplier
// in modified Baugh-Wooley form and gates every term with the enable bit of
// the output column it belongs to. Term (i, j), of weight 2**(i+j), is
//   x[i] & y[j]             when i < N-1 and j < N-1, or i = j = N-1,
//   ~(x[i] & y[j])          when exactly one of i, j is N-1 (NAND terms),
// and it is ANDed with t[i+j]: the 2-input AND of a plain multiplier
// becomes a 3-input AND, and t = 0 on a column holds all its terms at 0 so
// they do not toggle. The two constant 1s of the Baugh-Wooley form (weights
// 2**N and 2**(2N-1)) are not generated here; ptm adds them, ungated.
// The term types, the NAND terms and the per-column 3-input AND gating
// follow the published programmable-truncation matrix.
//
// Interface: x, y are N-bit two's complement operands; t has 2N-1 bits, one
// per product column 0..2N-2; pp[j] is row j (the terms with y[j]), bit i
// of it having weight 2**(i+j). Purely combinational. N defaults to 8.
module ptm_ppgen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]          x,
  input  logic [N-1:0]          y,
  input  logic [2*N-2:0]        t,
  output logic [N-1:0][N-1:0]   pp
);

  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      if ((i == N - 1) != (j == N - 1)) begin : g_nand
        assign pp[j][i] = ~(x[i] & y[j]) & t[i+j];
      end else begin : g_and
        assign pp[j][i] = x[i] & y[j] & t[i+j];
      end
    end
  end

endmodule
