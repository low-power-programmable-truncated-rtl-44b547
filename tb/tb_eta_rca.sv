// tb_eta_rca -- self-checking testbench for the ripple-carry accurate part.
// Applies corner cases and random operands at the default width (12 bits)
// and compares {cout, s} with integer addition.
module tb_eta_rca;
  localparam int W = 12;
  logic [W-1:0] a, b, s;
  logic         cout;
  int checks = 0, failures = 0;

  eta_rca #(.W(W)) dut (.a(a), .b(b), .s(s), .cout(cout));

  task automatic apply(input logic [W-1:0] va, vb);
    logic [W:0] exp;
    a = va; b = vb; #1;
    exp = {1'b0, va} + {1'b0, vb};
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d got=%0d exp=%0d", va, vb, {cout, s}, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('1, 1);
    apply(1, '1);
    apply({1'b1, {(W-1){1'b0}}}, {1'b1, {(W-1){1'b0}}});
    for (int n = 0; n < 20000; n++) apply(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
