// tb_ptm_ppgen -- self-checking testbench for the partial-product generator.
// With every column enabled, the weighted sum of the generated terms plus the
// constants 2**8 and 2**15 must equal the signed 8 x 8 product (mod 2**16),
// checked for all 65536 operand pairs. With random column enables each
// generated bit is compared with a per-term reference, and terms of disabled
// columns must be 0.
module tb_ptm_ppgen;
  import ptm_ref_pkg::*;
  localparam int N = 8;

  logic [N-1:0]        x, y;
  logic [2*N-2:0]      t;
  logic [N-1:0][N-1:0] pp;
  int checks = 0, failures = 0;

  ptm_ppgen #(.N(N)) dut (.x(x), .y(y), .t(t), .pp(pp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned s;
    t = '1;
    for (int xi = 0; xi < 256; xi++)
      for (int yi = 0; yi < 256; yi++) begin
        x = N'(xi); y = N'(yi); #1;
        s = (64'd1 << N) + (64'd1 << (2 * N - 1));
        for (int j = 0; j < N; j++)
          for (int i = 0; i < N; i++)
            s += 64'(pp[j][i]) << (i + j);
        check((s & mask(2 * N)) === smul_ref(x, y, N),
              $sformatf("x=%h y=%h sum=%h exp=%h", x, y, s & mask(2 * N), smul_ref(x, y, N)));
      end
    for (int n = 0; n < 5000; n++) begin
      x = N'($urandom); y = N'($urandom); t = (2*N-1)'($urandom); #1;
      for (int j = 0; j < N; j++)
        for (int i = 0; i < N; i++)
          check(pp[j][i] === term_ref(x, y, t, N, i, j),
                $sformatf("term i=%0d j=%0d x=%h y=%h t=%h", i, j, x, y, t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
