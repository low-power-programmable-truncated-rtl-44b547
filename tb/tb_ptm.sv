// tb_ptm -- self-checking testbench for the programmable truncated multiplier.
// Two instances of the 8 x 8 multiplier:
//   dutex  M = 0 (exact row adders): with all columns enabled it must give
//          the signed product for all 65536 operand pairs; with random
//          column enables it must give the exact sum of the enabled matrix
//          (column-sum reference, independent of the row-array order);
//   dut    default M = 3 ETA row adders: compared with a bit-serial model of
//          the ETA row array for all operand pairs at full precision and for
//          random operands and enables.
module tb_ptm;
  import ptm_ref_pkg::*;
  localparam int N = 8;
  localparam int M = 3;  // default inaccurate width of the row adders

  logic [N-1:0]   x, y;
  logic [2*N-2:0] t;
  logic [2*N-1:0] p, pex;
  int checks = 0, failures = 0;

  ptm                  dut   (.x(x), .y(y), .t(t), .p(p));
  ptm #(.N(N), .M(0))  dutex (.x(x), .y(y), .t(t), .p(pex));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic apply(input logic [N-1:0] vx, vy, input logic [2*N-2:0] vt);
    x = vx; y = vy; t = vt; #1;
    check(64'(pex) === matrix_ref(vx, vy, vt, N),
          $sformatf("exact x=%h y=%h t=%h got=%h exp=%h", vx, vy, vt, pex, matrix_ref(vx, vy, vt, N)));
    check(64'(p) === ptm_ref(vx, vy, vt, N, M),
          $sformatf("eta x=%h y=%h t=%h got=%h exp=%h", vx, vy, vt, p, ptm_ref(vx, vy, vt, N, M)));
    if (vt == '1)
      check(64'(pex) === smul_ref(vx, vy, N), $sformatf("signed x=%h y=%h", vx, vy));
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xi = 0; xi < 256; xi++)
      for (int yi = 0; yi < 256; yi++)
        apply(N'(xi), N'(yi), '1);
    // Operand sets of the two reference simulations, each with its enables.
    apply(8'b1111_0011, 8'b1100_1101, 15'b111_1111_1000_0000);
    apply(8'b1111_1101, 8'b1100_1111, 15'b000_0000_0111_1111);
    // Half of the matrix disabled, as in direct truncation.
    for (int n = 0; n < 2000; n++) apply(N'($urandom), N'($urandom), 15'h7F00);
    for (int n = 0; n < 20000; n++) apply(N'($urandom), N'($urandom), (2*N-1)'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
