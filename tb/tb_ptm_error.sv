// tb_ptm_error -- error profile of the 8 x 8 programmable truncated
// multiplier (default ETA split) over all 65536 operand pairs, for three
// truncation vectors: all columns on, t = 0x7F80 (the N most significant
// columns on) and t = 0x7F00 (half of the matrix off). For each it reports
// the mean and the largest absolute error of the signed product against the
// exact product, and of the fixed-width result (upper 8 bits). Every output
// is also compared with the bit-serial model of the ETA row array.
// Checks: with no column disabled the product is never larger than exact
// (ETAs only lose carries); disabling columns gives a negative mean error
// (a negative bias, as for direct truncation) that grows as more columns are
// switched off.
module tb_ptm_error;
  import ptm_ref_pkg::*;
  localparam int N = 8;
  localparam int M = 3;  // default inaccurate width of the row adders

  logic [N-1:0]   x, y;
  logic [2*N-2:0] t;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  ptm dut (.x(x), .y(y), .t(t), .p(p));

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

  // Per-profile statistics, in units of the product LSB.
  longint sum_err, max_err, e, exact, got;
  real    mean_err [3];
  bit     never_over [3];
  logic [2*N-2:0] tv [3] = '{15'h7FFF, 15'h7F80, 15'h7F00};

  initial begin
    for (int k = 0; k < 3; k++) begin
      sum_err = 0; max_err = 0; never_over[k] = 1;
      t = tv[k];
      for (int xi = -128; xi < 128; xi++)
        for (int yi = -128; yi < 128; yi++) begin
          x = N'(xi); y = N'(yi); #1;
          check(64'(p) === ptm_ref(64'(x), 64'(y), 64'(t), N, M), $sformatf("x=%h y=%h t=%h", x, y, t));
          exact = longint'(xi) * longint'(yi);
          got   = longint'($signed(p));
          e     = got - exact;
          if (e > 0) never_over[k] = 0;
          sum_err += e;
          if ((e < 0 ? -e : e) > max_err) max_err = (e < 0 ? -e : e);
        end
      mean_err[k] = real'(sum_err) / 65536.0;
      $display("t=%h  mean error %0.2f  max |error| %0d  (units of the product LSB)", t, mean_err[k], max_err);
    end
    check(never_over[0], "full precision: product above exact value");
    check(mean_err[0] <= 0.0, "full precision: positive mean error");
    check(mean_err[2] < 0.0, "t=7F00: no negative bias");
    check(mean_err[2] < mean_err[1], "t=7F00 error not larger than t=7F80");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
