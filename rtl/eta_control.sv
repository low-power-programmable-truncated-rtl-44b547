// eta_control -- control block of the ETA inaccurate part.
//
// The inaccurate part is added without carries. To limit the error, bits are
// examined from the most significant towards the least significant: at the
// first position where both operand bits are 1, that sum bit and every less
// significant sum bit are forced to 1. This block produces the per-bit
// force signal: ctl[i] is 1 when some position j >= i (within this part) has
// a[j] & b[j] = 1. It is built as a chain running from MSB to LSB, one
// AND-OR cell per bit, which follows the left-to-right checking order. The
// function is the published one; this chain is the simplest circuit for it
// and is this design's own choice.
//
// Interface: a, b are the W low-order operand bits; ctl is the W-bit force
// vector for the carry-free addition block. Purely combinational.
// W defaults to 20, the inaccurate-part width of the 32-bit ETA.
module eta_control #(
  parameter int unsigned W = 20
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] ctl
);

  assign ctl[W-1] = a[W-1] & b[W-1];

  for (genvar i = W - 1; i > 0; i--) begin : g_chain
    assign ctl[i-1] = ctl[i] | (a[i-1] & b[i-1]);
  end

endmodule
