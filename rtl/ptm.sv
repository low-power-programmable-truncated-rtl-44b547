// ptm -- programmable truncated multiplier using error-tolerant adders.
//
// Multiplies two N-bit two's complement numbers into a 2N-bit product. The
// partial-product matrix (ptm_ppgen) is column-gated by the truncation
// vector t: column k of the matrix is computed only when t[k] = 1, so the
// active width of the multiplier is chosen at run time. With t all ones the
// product is exact; t = {N{1'b1}, {N-1}{1'b0}}, for example, keeps only the
// most significant part of the matrix (like direct truncation).
//
// The rows are summed by a linear array of N-1 error-tolerant adders
// (eta), each N bits wide. Row 0 plus the constant 1 at weight 2**N forms
// the initial (N+1)-bit value a[0]. Stage k adds row k to a[k-1] shifted
// right by one; the bit shifted out is final product bit k-1. The last stage
// a[N-1] gives product bits 2N-1..N-1, and the constant 2**(2N-1) of the
// Baugh-Wooley form is added by inverting product bit 2N-1.
// Summing with ETAs is the published idea; arranging them as this linear
// row array (seven 8-bit adders with 9-bit sums for N = 8) is this design's
// reading of it, as the adder structure is not spelled out.
// Each eta has its M least significant bits in the carry-free inaccurate
// part, so with M > 0 the product is approximate even when t is all ones;
// M = 0 makes every stage exact.
//
// Interface: x, y (N bits), t (2N-1 bits, one enable per product column),
// p (2N bits). Purely combinational.
// Defaults: N = 8 (an 8 x 8 multiplier with a 16-bit product). M = 3 is
// the widest inaccurate part for which an 8-bit ETA still gives better than
// 95 % accuracy on at least 98 % of all input pairs (98.4 %; M = 4 gives
// 93.5 %), the acceptance rule used to size the ETA split.
module ptm #(
  parameter int unsigned N = 8,
  parameter int unsigned M = 3
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  input  logic [2*N-2:0] t,
  output logic [2*N-1:0] p
);

  logic [N-1:0][N-1:0] pp;   // pp[j]: partial-product row j
  logic [N:0]          a [N]; // a[k]: running sum after stage k

  ptm_ppgen #(.N(N)) u_ppgen (
    .x (x),
    .y (y),
    .t (t),
    .pp(pp)
  );

  // Row 0 occupies weights 0..N-1; the free bit at weight 2**N takes the
  // ungated Baugh-Wooley constant.
  assign a[0] = {1'b1, pp[0]};

  for (genvar k = 1; k < N; k++) begin : g_stage
    eta #(.W(N), .M(M)) u_eta (
      .a  (a[k-1][N:1]),
      .b  (pp[k]),
      .sum(a[k])
    );
    assign p[k-1] = a[k-1][0];
  end

  assign p[2*N-2:N-1] = a[N-1][N-1:0];
  assign p[2*N-1]     = ~a[N-1][N];

endmodule
