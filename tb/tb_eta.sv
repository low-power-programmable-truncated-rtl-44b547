// tb_eta -- self-checking testbench for the error-tolerant adder.
// Three instances:
//   dut32  default 32-bit adder (12-bit accurate, 20-bit inaccurate part),
//          checked against a bit-serial reference model on random and
//          corner operands; it also measures the accuracy requirement
//          (at least 98 % of random inputs with accuracy above 95 %);
//   dut16  16-bit adder split 8/8, checked on the worked example
//          45978 + 26899 = 72863 (exact sum 72877);
//   dutex  32-bit adder with no inaccurate part, which must add exactly.
module tb_eta;
  import ptm_ref_pkg::*;

  logic [31:0] a32, b32;
  logic [32:0] s32, sex;
  logic [15:0] a16, b16;
  logic [16:0] s16;
  int checks = 0, failures = 0;

  eta                      dut32 (.a(a32), .b(b32), .sum(s32));
  eta #(.W(16), .M(8))     dut16 (.a(a16), .b(b16), .sum(s16));
  eta #(.W(32), .M(0))     dutex (.a(a32), .b(b32), .sum(sex));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic apply32(input logic [31:0] va, vb);
    a32 = va; b32 = vb; #1;
    check(64'(s32) === eta_ref(va, vb, 32, 20),
          $sformatf("eta32 a=%h b=%h got=%h exp=%h", va, vb, s32, eta_ref(va, vb, 32, 20)));
    check(sex === {1'b0, va} + {1'b0, vb},
          $sformatf("exact a=%h b=%h got=%h", va, vb, sex));
    // An ETA never over-estimates and errs by less than 2**20.
    check((64'(s32) <= 64'(va) + 64'(vb)) && (64'(va) + 64'(vb) - 64'(s32) < 64'd1 << 20),
          $sformatf("error bound a=%h b=%h", va, vb));
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int good, total;
    real acc;
    // Worked example.
    a16 = 16'd45978; b16 = 16'd26899; #1;
    check(s16 === 17'd72863, $sformatf("example got %0d", s16));
    check(17'd72877 - s16 === 17'd14, "example error");

    apply32('0, '0);
    apply32('1, '1);
    apply32(32'h000F_FFFF, 32'h0000_0001);  // carry lost at the part boundary
    apply32(32'h0008_0000, 32'h0008_0000);  // both MSBs of the inaccurate part set
    apply32(32'hFFF0_0000, 32'h0010_0000);
    for (int n = 0; n < 20000; n++) apply32($urandom, $urandom);
    for (int n = 0; n < 5000; n++) apply32($urandom & $urandom, $urandom & $urandom);

    // Accuracy requirement on random inputs.
    good = 0; total = 0;
    for (int n = 0; n < 10000; n++) begin
      a32 = $urandom; b32 = $urandom; #1;
      if (64'(a32) + 64'(b32) != 0) begin
        acc = 1.0 - real'(64'(a32) + 64'(b32) - 64'(s32)) / real'(64'(a32) + 64'(b32));
        total++;
        if (acc > 0.95) good++;
      end
    end
    $display("accuracy > 95%% for %0d of %0d random inputs", good, total);
    check(real'(good) >= 0.98 * real'(total), "accuracy requirement");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
