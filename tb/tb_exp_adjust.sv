// tb_exp_adjust: random intermediate exponents and adjustments, plus the
// boundary cases at 767. Expected er = er_int + normalize + ex_adj -
// rslt_zero (when exp_zero), and max with er = 0 when that exceeds 767.
module tb_exp_adjust;
  logic [9:0] er_int, er;
  logic normalize, ex_adj, exp_zero, max;
  logic [4:0] rslt_zero;
  int checks = 0, failures = 0;
  exp_adjust dut (.*);
  initial begin : watchdog
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(int e, bit n, bit x, bit z, int r);
    int want;
    er_int = 10'(e); normalize = n; ex_adj = x; exp_zero = z; rslt_zero = 5'(r);
    #1;
    want = e + int'(n) + int'(x) - (z ? r : 0);
    checks++;
    if (max !== (want > 767) || er !== (want > 767 ? 10'd0 : 10'(want))) begin
      failures++;
      if (failures < 5) $display("e=%0d n=%0d x=%0d z=%0d r=%0d: er=%0d max=%0d", e, n, x, z, r, er, max);
    end
  endtask
  initial begin
    run(767, 1, 0, 0, 0); run(767, 0, 1, 0, 0); run(766, 1, 1, 0, 0); run(767, 0, 0, 1, 1);
    run(767, 0, 0, 0, 0); run(16, 0, 0, 1, 16);
    for (int i = 0; i < 3000; i++) begin
      int e = $urandom_range(16, 767);
      bit z = 1'($urandom);
      run(e, 1'($urandom), 1'($urandom), z, z ? $urandom_range(1, 16) : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
