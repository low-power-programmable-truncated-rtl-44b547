// eta_cfa -- carry-free addition block of the ETA inaccurate part.
//
// Each sum bit is formed from its own operand bits only: no carry is
// generated or taken in at any position. Where the control block raises
// ctl[i] the sum bit is forced to 1; elsewhere it is the one-bit sum a ^ b.
// (Where ctl is low, a & b is 0 at that bit, so a ^ b equals a | b.)
// The carry-free rule is the published ETA's; the one-gate-per-bit form is
// this design's own, simplest realisation of it.
//
// Interface: a, b are the W low-order operand bits, ctl the force vector
// from eta_control; s is the W-bit approximate sum. Purely combinational.
// W defaults to 20, the inaccurate-part width of the 32-bit ETA.
module eta_cfa #(
  parameter int unsigned W = 20
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] ctl,
  output logic [W-1:0] s
);

  assign s = ctl | (a ^ b);

endmodule
