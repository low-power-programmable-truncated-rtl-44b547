// eta -- error-tolerant adder.
//
// A W-bit adder split at bit M into two parts that work side by side:
//   * the accurate part, bits W-1..M, is an exact ripple-carry adder
//     (eta_rca) whose carry-in is grounded;
//   * the inaccurate part, bits M-1..0, is a control block (eta_control)
//     feeding a carry-free addition block (eta_cfa): bits are added without
//     carries, and from the most significant position where both operand
//     bits are 1 downwards every sum bit is set to 1.
// No carry passes from the inaccurate part into the accurate part, so the
// result can be smaller than the true sum, by less than 2**M. Example with
// W=16, M=8: 45978 + 26899 gives 72863 instead of 72877.
//
// Interface: a, b are W-bit unsigned operands; sum is the (W+1)-bit
// approximate sum, its top bit being the accurate part's carry out.
// Purely combinational. Defaults W=32, M=20 are the 32-bit ETA with a 20-bit
// inaccurate part and 12-bit accurate part. M=0 gives an exact adder.
// The W/M split and the part structure follow the ETA architecture; the
// control chain is this implementation's simplest form of it.
module eta #(
  parameter int unsigned W = 32,
  parameter int unsigned M = 20
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   sum
);

  // Accurate part.
  logic [W-M-1:0] s_hi;
  logic           c_hi;

  eta_rca #(.W(W - M)) u_acc (
    .a   (a[W-1:M]),
    .b   (b[W-1:M]),
    .s   (s_hi),
    .cout(c_hi)
  );

  assign sum[W:M] = {c_hi, s_hi};

  // Inaccurate part.
  if (M > 0) begin : g_inacc
    logic [M-1:0] ctl;

    eta_control #(.W(M)) u_ctl (
      .a  (a[M-1:0]),
      .b  (b[M-1:0]),
      .ctl(ctl)
    );

    eta_cfa #(.W(M)) u_cfa (
      .a  (a[M-1:0]),
      .b  (b[M-1:0]),
      .ctl(ctl),
      .s  (sum[M-1:0])
    );
  end

endmodule
