// tb_exp_diff: random significands and exponents. Checks the properties the
// shift amounts must have: the large operand (larger exponent minus leading
// zeros, operand a on a tie, a zero never large unless both are) is shifted
// left without losing digits and as far as needed toward the small
// exponent; the right shift brings the small operand to the common
// exponent (saturated at 20); a small operand with the larger exponent is
// shifted left to the large one's exponent. Includes the worked example
// 0786000000000000 x10^6 + 43720 x10^0 (left 1, right 5, exponent 5).
module tb_exp_diff;
  import tb_dfp_ref_pkg::*;
  logic [63:0] na1, nb1;
  logic [9:0]  ea, eb, er_int_out, emin;
  logic        swap;
  logic [4:0]  left_amount, right_amount, left_small_amount;
  int checks = 0, failures = 0;

  exp_diff dut (.*);

  initial begin : watchdog
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 8) $display("FAIL %s: na1=%h ea=%0d nb1=%h eb=%0d -> swap=%0d l=%0d r=%0d ls=%0d er=%0d",
                                 what, na1, ea, nb1, eb, swap, left_amount, right_amount, left_small_amount, er_int_out);
    end
  endtask

  function automatic u128_t rc();
    u128_t c = 0;
    int nd = $urandom_range(0, 16);
    for (int i = 0; i < nd; i++) c = c * 10 + u128_t'($urandom_range(i == 0 ? 1 : 0, 9));
    return c;
  endfunction

  initial begin
    u128_t ca, cb, cl;
    int a_e, b_e, el, es, lzl, effa, effb;
    bit want_swap;
    na1 = 64'h0786_0000_0000_0000; nb1 = 64'h0000_0000_0004_3720; ea = 6; eb = 0; #1;
    chk(!swap && left_amount == 1 && right_amount == 5 && left_small_amount == 0 && er_int_out == 5, "example");
    for (int i = 0; i < 5000; i++) begin
      ca = rc(); cb = rc();
      a_e = $urandom_range(0, 767);
      b_e = (i % 2) ? $urandom_range(0, 767) : a_e + $urandom_range(0, 40) - 20;
      if (b_e < 0) b_e = 0;
      if (b_e > 767) b_e = 767;
      na1 = to_bcd(ca)[63:0]; nb1 = to_bcd(cb)[63:0]; ea = 10'(a_e); eb = 10'(b_e);
      #1;
      effa = a_e - (16 - ndigits(ca)); effb = b_e - (16 - ndigits(cb));
      if (ca == 0) want_swap = (cb != 0);
      else if (cb == 0) want_swap = 0;
      else want_swap = effb > effa;
      chk(swap == want_swap, "swap");
      chk(emin == 10'(a_e < b_e ? a_e : b_e), "emin");
      el = want_swap ? b_e : a_e; es = want_swap ? a_e : b_e; cl = want_swap ? cb : ca;
      lzl = 16 - ndigits(cl);
      if (ca == 0 && cb == 0) begin
        chk(er_int_out == emin && right_amount == 0 && left_small_amount == 0, "both zero");
      end else if (el >= es) begin
        chk(int'(left_amount) <= lzl, "left within leading zeros");
        chk(int'(left_amount) == el - es || int'(left_amount) == lzl, "left as far as possible");
        chk(int'(er_int_out) == el - int'(left_amount), "common exponent");
        chk(int'(right_amount) == ((el - int'(left_amount) - es) > 20 ? 20 : (el - int'(left_amount) - es)), "right");
        chk(left_small_amount == 0, "no small left shift");
      end else begin
        chk(left_amount == 0 && right_amount == 0, "no large shift");
        chk(int'(er_int_out) == el, "common exponent = min");
        chk(int'(left_small_amount) == ((es - el) > 16 ? 16 : es - el), "left_small");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
