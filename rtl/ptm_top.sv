// ptm_top -- clocked programmable truncated multiplier.
//
// Wraps the combinational multiplier (ptm) between an input register stage
// (operands x, y and truncation vector t) and an output register stage, so
// that the multiplier array sees one clean transition per clock. The
// truncation vector may change on any cycle; it is sampled together with the
// operands, so each product uses the t given with its own operands.
//
// Interface:
//   clk, rst_n      clock, asynchronous active-low reset (clears all
//                   registers, including the valid flags)
//   in_valid        x, y, t are taken in on this cycle
//   x, y            N-bit two's complement operands
//   t               2N-1 column enables (bit k enables product column k)
//   out_valid       p and mul_op hold the result of an accepted operation
//   p               full 2N-bit product
//   mul_op          upper N bits of p, the fixed-width (N-bit) result
// Timing: operands presented with in_valid are captured by the input stage
// at rising edge n; their product is captured by the output stage at edge
// n+1, when out_valid rises. Inputs to output is thus two register stages,
// one clock cycle after acceptance. A new operation can be accepted every
// cycle.
// The register stages, the valid flags and the reset are this design's own
// choices; the multiplier itself follows the programmable-truncation
// architecture with ETA row adders.
module ptm_top #(
  parameter int unsigned N = 8,
  parameter int unsigned M = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  input  logic [2*N-2:0] t,
  output logic           out_valid,
  output logic [2*N-1:0] p,
  output logic [N-1:0]   mul_op
);

  logic [N-1:0]   x_q, y_q;
  logic [2*N-2:0] t_q;
  logic           v_q;
  logic [2*N-1:0] p_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      y_q <= '0;
      t_q <= '0;
      v_q <= 1'b0;
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        x_q <= x;
        y_q <= y;
        t_q <= t;
      end
    end
  end

  ptm #(.N(N), .M(M)) u_ptm (
    .x(x_q),
    .y(y_q),
    .t(t_q),
    .p(p_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= v_q;
      if (v_q) p <= p_d;
    end
  end

  assign mul_op = p[2*N-1:N];

endmodule
