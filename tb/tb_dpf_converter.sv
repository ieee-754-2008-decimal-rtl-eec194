// tb_dpf_converter: random finite results are packed and compared with the
// reference packer; the special-value priority (sNaN, qNaN, infinity,
// infinity minus infinity), overflow results for every mode and sign, and
// the sign of an exact zero difference are checked one by one.
module tb_dpf_converter;
  import tb_dfp_ref_pkg::*;
  import dfp_pkg::*;
  unpacked_t   a, b;
  logic        sign_in, eff_sub, sign_r, max, inexact_in, inexact, overflow, invalid;
  logic [2:0]  round_mode;
  logic [9:0]  er;
  logic [63:0] coef, result;
  int checks = 0, failures = 0;

  dpf_converter dut (.*);

  initial begin : watchdog
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(logic [63:0] want, bit ix, bit ov, bit iv, string what);
    #1; checks++;
    if (result !== want || inexact !== ix || overflow !== ov || invalid !== iv) begin
      failures++;
      if (failures < 8) $display("FAIL %s: got %h %0d%0d%0d want %h %0d%0d%0d", what, result,
                                 inexact, overflow, invalid, want, ix, ov, iv);
    end
  endtask

  function automatic unpacked_t mk(dfp_class_e c, bit s);
    unpacked_t u;
    u.sign = s; u.exp = '0; u.sig = '0; u.cls = c;
    return u;
  endfunction

  initial begin
    u128_t c;
    int e;
    bit s;
    a = mk(CLS_FINITE, 0); b = mk(CLS_FINITE, 0);
    sign_in = 0; max = 0; round_mode = 0;
    for (int i = 0; i < 3000; i++) begin
      c = 0;
      for (int j = $urandom_range(1, 16); j > 0; j--) c = c * 10 + u128_t'($urandom_range(0, 9));
      if (c == 0) c = 1;
      e = $urandom_range(0, 767); s = 1'($urandom);
      coef = to_bcd(c)[63:0]; er = 10'(e); sign_r = s; eff_sub = 1'($urandom);
      inexact_in = 1'($urandom); round_mode = 3'($urandom_range(0, 6));
      chk(pack(s, e, c), inexact_in, 0, 0, "finite");
    end
    // exact zero difference: +0, or -0 when rounding toward -inf
    coef = '0; er = 10'd398; sign_r = 1; eff_sub = 1; inexact_in = 0;
    for (int m = 0; m < 7; m++) begin
      round_mode = 3'(m);
      chk(pack(m == 3, 398, 0), 0, 0, 0, "zero sign");
    end
    // overflow
    max = 1; eff_sub = 0; coef = '1;
    for (int m = 0; m < 7; m++) for (int sg = 0; sg < 2; sg++) begin
      bit to_max;
      to_max = (m == 4) || (m == 2 && sg == 1) || (m == 3 && sg == 0);
      round_mode = 3'(m); sign_r = 1'(sg);
      chk(to_max ? pack(1'(sg), 767, pow10(16) - 1) : {1'(sg), 5'b11110, 58'd0}, 1, 1, 0, "overflow");
    end
    max = 0;
    // specials
    a = mk(CLS_SNAN, 1); b = mk(CLS_QNAN, 0); chk(QNAN, 0, 0, 1, "snan");
    a = mk(CLS_INF, 0); b = mk(CLS_SNAN, 0); chk(QNAN, 0, 0, 1, "inf + snan");
    a = mk(CLS_FINITE, 0); b = mk(CLS_QNAN, 1); chk(QNAN, 0, 0, 0, "qnan");
    a = mk(CLS_INF, 1); b = mk(CLS_FINITE, 0); chk({1'b1, 5'b11110, 58'd0}, 0, 0, 0, "inf a");
    a = mk(CLS_INF, 1); b = mk(CLS_INF, 1); eff_sub = 0; chk({1'b1, 5'b11110, 58'd0}, 0, 0, 0, "inf + inf");
    a = mk(CLS_INF, 1); b = mk(CLS_INF, 0); eff_sub = 1; chk(QNAN, 0, 0, 1, "inf - inf");
    a = mk(CLS_FINITE, 1); b = mk(CLS_INF, 0); sign_in = 1; chk({1'b1, 5'b11110, 58'd0}, 0, 0, 0, "inf b");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
