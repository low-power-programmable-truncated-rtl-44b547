// eta_rca -- accurate part of the error-tolerant adder (ETA).
//
// A plain ripple-carry adder: W full-adder cells, each passing its carry to
// the next more significant cell. The carry into the least significant cell
// is tied to ground, so no carry ever enters from the inaccurate lower part
// of the ETA. The ripple adder is used because it is the lowest-power
// conventional adder and the accurate part is not on the critical path; that
// choice is the one the design is built around. The full-adder cell
// equations are this implementation's own.
//
// Interface: a, b are W-bit unsigned operands; s is their W-bit sum and cout
// the carry out of the most significant cell. Purely combinational.
// W defaults to 12, the accurate-part width of the 32-bit ETA.
module eta_rca #(
  parameter int unsigned W = 12
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic         cout
);

  // c[k] is the carry into cell k; c[0] is the grounded carry-in.
  logic [W:0] c;

  assign c[0] = 1'b0;

  for (genvar k = 0; k < W; k++) begin : g_fa
    assign s[k]   = a[k] ^ b[k] ^ c[k];
    assign c[k+1] = (a[k] & b[k]) | (c[k] & (a[k] ^ b[k]));
  end

  assign cout = c[W];

endmodule
