// tb_sig_align: random significands and shift amounts; na2 and nb2 are
// compared with integer scaling: na2 = large * 10^left, nb2 digits =
// small * 100 * 10^left_small, or floor(small * 100 / 10^right) with the
// sticky bit set when the division has a remainder.
module tb_sig_align;
  import tb_dfp_ref_pkg::*;
  logic [63:0] na1, nb1, na2;
  logic [72:0] nb2;
  logic        swap;
  logic [4:0]  left_amount, right_amount, left_small_amount;
  int checks = 0, failures = 0;

  sig_align dut (.*);

  initial begin : watchdog
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    u128_t l, s, t, wd;
    bit ws;
    int nd;
    for (int i = 0; i < 5000; i++) begin
      nd = $urandom_range(1, 16);
      l = 0; for (int j = 0; j < nd; j++) l = l * 10 + u128_t'($urandom_range(0, 9));
      nd = $urandom_range(1, 16);
      s = 0; for (int j = 0; j < nd; j++) s = s * 10 + u128_t'($urandom_range(0, 9));
      swap = 1'($urandom);
      na1 = swap ? to_bcd(s)[63:0] : to_bcd(l)[63:0];
      nb1 = swap ? to_bcd(l)[63:0] : to_bcd(s)[63:0];
      left_amount = 5'(16 - ndigits(l) == 0 ? 0 : $urandom_range(0, 16 - ndigits(l)));
      left_small_amount = 0; right_amount = 0;
      if ($urandom_range(0, 2) == 0)
        left_small_amount = 5'(16 - ndigits(s) == 0 ? 0 : $urandom_range(0, 16 - ndigits(s)));
      else
        right_amount = 5'($urandom_range(0, 20));
      #1;
      t = s * 100;
      if (left_small_amount != 0) begin wd = t * pow10(int'(left_small_amount)); ws = 0; end
      else begin wd = t / pow10(int'(right_amount)); ws = (t % pow10(int'(right_amount))) != 0; end
      checks++;
      if (na2 !== to_bcd(l * pow10(int'(left_amount)))[63:0] || nb2 !== {to_bcd(wd)[71:0], ws}) begin
        failures++;
        if (failures < 5) $display("l=%0d s=%0d left=%0d ls=%0d r=%0d: na2=%h nb2=%h", l, s, left_amount,
                                   left_small_amount, right_amount, na2, nb2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
