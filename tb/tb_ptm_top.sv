// tb_ptm_top -- end-to-end testbench of the clocked programmable truncated
// multiplier at its default size (8 x 8, ETA row adders with 3-bit
// inaccurate parts). No parameter is overridden.
//
// Streams operations into the top with random idle cycles, a reset in the
// middle of a stream and run-time changes of the truncation vector. Every
// result is compared with a bit-serial model of the ETA row array, mul_op
// with the upper half of p, and out_valid must rise exactly one clock edge
// after the edge that accepted the operation. Counts how often each mechanism occurred and
// fails if any never did: full-precision operation, truncated operation,
// half-matrix truncation (t = 0x7F00), truncation-vector change between
// back-to-back operations, an ETA approximation (result differs from the
// exact value of the enabled matrix), an idle cycle, and a reset.
module tb_ptm_top;
  import ptm_ref_pkg::*;
  localparam int N = 8;
  localparam int M = 3;  // default inaccurate width of the row adders

  logic           clk, rst_n = 0, in_valid = 0;
  logic [N-1:0]   x = '0, y = '0;
  logic [2*N-2:0] t = '0;
  logic           out_valid;
  logic [2*N-1:0] p;
  logic [N-1:0]   mul_op;

  int checks = 0, failures = 0;
  longint cycle;

  typedef struct {
    longint          issued;
    longint unsigned exp;
  } op_t;
  op_t q[$];

  int n_full = 0, n_trunc = 0, n_half = 0, n_switch = 0, n_eta = 0, n_idle = 0, n_reset = 0;
  logic [2*N-2:0] last_t = '0;
  bit have_last = 0;

  ptm_top dut (.*);

  initial begin
    clk   = 0;
    cycle = 0;
    forever #5 clk = ~clk;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  // Monitor: every rising edge, look at what the registers now hold.
  always @(posedge clk) begin : monitor
    op_t o;
    cycle <= cycle + 1;
    #1;
    if (rst_n && out_valid) begin
      if (q.size() == 0) begin
        check(0, "out_valid with no operation pending");
      end else begin
        o = q.pop_front();
        check(cycle - o.issued === 1, $sformatf("latency %0d", cycle - o.issued));
        check(64'(p) === o.exp, $sformatf("p=%h exp=%h", p, o.exp));
        check(mul_op === p[2*N-1:N], "mul_op is not the upper half of p");
      end
    end
  end

  // Drive one operation (accepted at the next rising edge).
  task automatic issue(input logic [N-1:0] vx, vy, input logic [2*N-2:0] vt);
    op_t o;
    @(negedge clk);
    x = vx; y = vy; t = vt; in_valid = 1;
    o.issued = cycle + 1;
    o.exp    = ptm_ref(vx, vy, vt, N, M);
    q.push_back(o);
    if (vt == '1) n_full++; else n_trunc++;
    if (vt == 15'h7F00) n_half++;
    if (have_last && vt != last_t) n_switch++;
    if (o.exp != matrix_ref(vx, vy, vt, N)) n_eta++;
    last_t = vt; have_last = 1;
    @(posedge clk);
    #2 in_valid = 0;
  endtask

  task automatic idle(input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      in_valid = 0;
      n_idle++;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // Operand sets of the two reference simulations.
    issue(8'b1111_0011, 8'b1100_1101, 15'b111_1111_1000_0000);
    issue(8'b1111_1101, 8'b1100_1111, 15'b000_0000_0111_1111);
    idle(3);

    // Full precision over every operand pair, back to back.
    for (int xi = 0; xi < 256; xi++)
      for (int yi = 0; yi < 256; yi++)
        issue(N'(xi), N'(yi), '1);
    idle(2);

    // Truncation vector switching at run time, with idle gaps.
    for (int n = 0; n < 5000; n++) begin
      logic [2*N-2:0] vt;
      case ($urandom % 4)
        0: vt = '1;
        1: vt = 15'h7F00;
        2: vt = '1 << ($urandom % 15);
        default: vt = (2*N-1)'($urandom);
      endcase
      issue(N'($urandom), N'($urandom), vt);
      if ($urandom % 8 == 0) idle(1 + $urandom % 3);
    end

    // Reset with operations in flight: they are dropped.
    issue(8'h55, 8'hAA, '1);
    @(negedge clk) rst_n = 0;
    q.delete();
    n_reset++;
    @(negedge clk);
    check(out_valid === 0 && p === '0, "reset clears the output stage");
    rst_n = 1;
    issue(8'h80, 8'h80, '1);
    issue(8'h7F, 8'h81, 15'h7F00);
    idle(4);
    check(q.size() === 0, "all operations completed");

    $display("full=%0d truncated=%0d half=%0d t_switch=%0d eta_approx=%0d idle=%0d reset=%0d",
             n_full, n_trunc, n_half, n_switch, n_eta, n_idle, n_reset);
    check(n_full > 0, "no full-precision operation");
    check(n_trunc > 0, "no truncated operation");
    check(n_half > 0, "no half-matrix truncation");
    check(n_switch > 0, "no truncation-vector switch");
    check(n_eta > 0, "no ETA approximation");
    check(n_idle > 0, "no idle cycle");
    check(n_reset > 0, "no reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
