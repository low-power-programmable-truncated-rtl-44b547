// tb_eta_control -- self-checking testbench for the ETA control block.
// For each input pair the expected force vector is found by scanning from
// the MSB down and latching at the first position where both bits are 1.
// Default width (20 bits); sparse random operands make the first such
// position land anywhere in the word.
module tb_eta_control;
  localparam int W = 20;
  logic [W-1:0] a, b, ctl;
  int checks = 0, failures = 0;

  eta_control #(.W(W)) dut (.a(a), .b(b), .ctl(ctl));

  task automatic apply(input logic [W-1:0] va, vb);
    logic [W-1:0] exp;
    bit hit;
    a = va; b = vb; #1;
    hit = 0;
    for (int i = W - 1; i >= 0; i--) begin
      if (va[i] && vb[i]) hit = 1;
      exp[i] = hit;
    end
    checks++;
    if (ctl !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h got=%h exp=%h", va, vb, ctl, exp);
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
    apply('1, '0);
    apply('1, '1);
    for (int i = 0; i < W; i++) apply(W'(1) << i, W'(1) << i);
    for (int n = 0; n < 20000; n++)
      apply(W'($urandom & $urandom), W'($urandom & $urandom & $urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
