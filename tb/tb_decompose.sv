// tb_decompose: random Decimal64 operands built by the reference packer
// (sign, biased exponent, integer coefficient) are unpacked and the sign,
// exponent, BCD significand and class compared; NaN, sNaN and infinity
// patterns and the effective-operation output are checked too.
module tb_decompose;
  import tb_dfp_ref_pkg::*;
  import dfp_pkg::*;
  logic [63:0] operand_a, operand_b;
  logic        sign_in, eff_sub;
  unpacked_t   a, b;
  int checks = 0, failures = 0;

  decompose dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 8) $display("FAIL %s", what); end
  endtask

  initial begin
    bit s; int e; u128_t c, cb;
    for (int i = 0; i < 3000; i++) begin
      s = 1'($urandom); e = $urandom_range(0, 767);
      c = (u128_t'($urandom) << 32 | u128_t'($urandom)) % pow10(16);
      if (i % 7 == 0) c = pow10(16) - 1 - u128_t'($urandom_range(0, 999));
      cb = u128_t'($urandom_range(0, 99999));
      operand_a = pack(s, e, c);
      operand_b = pack(!s, 767 - e, cb);
      sign_in = 1'($urandom);
      #1;
      chk(a.sign == s && a.exp == 10'(e) && a.sig == to_bcd(c)[63:0] && a.cls == CLS_FINITE, "operand a");
      chk(b.sign == !s && b.exp == 10'(767 - e) && b.sig == to_bcd(cb)[63:0] && b.cls == CLS_FINITE, "operand b");
      chk(eff_sub == !sign_in, "eff_sub with opposite signs");
    end
    operand_a = {1'b1, 5'b11110, 58'h123}; operand_b = {1'b0, 5'b11111, 1'b1, 57'h5}; sign_in = 0; #1;
    chk(a.cls == CLS_INF && a.sign && b.cls == CLS_SNAN, "inf / snan");
    operand_a = {1'b0, 5'b11111, 1'b0, 57'h5}; operand_b = pack(0, 0, 0); #1;
    chk(a.cls == CLS_QNAN && b.cls == CLS_FINITE && b.sig == '0 && eff_sub == 1'b0, "qnan / zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
