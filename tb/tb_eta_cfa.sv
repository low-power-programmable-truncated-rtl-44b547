// tb_eta_cfa -- self-checking testbench for the carry-free addition block.
// Each sum bit must be 1 where the force input is set, and otherwise the
// one-bit sum (a + b) mod 2 of its own operand bits. Default width 20.
module tb_eta_cfa;
  localparam int W = 20;
  logic [W-1:0] a, b, ctl, s;
  int checks = 0, failures = 0;

  eta_cfa #(.W(W)) dut (.a(a), .b(b), .ctl(ctl), .s(s));

  task automatic apply(input logic [W-1:0] va, vb, vc);
    logic [W-1:0] exp;
    a = va; b = vb; ctl = vc; #1;
    for (int i = 0; i < W; i++) exp[i] = vc[i] ? 1'b1 : 1'((int'(va[i]) + int'(vb[i])) % 2);
    checks++;
    if (s !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h ctl=%h got=%h exp=%h", va, vb, vc, s, exp);
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
    apply('1, '1, '0);
    apply('0, '0, '1);
    for (int n = 0; n < 20000; n++) apply(W'($urandom), W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
