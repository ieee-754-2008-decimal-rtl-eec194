// tb_sign_result: all 64 input combinations. The expected sign is worked
// out from the numbers: the result is a + (-1)^sign_in * b; in an
// effective subtraction it carries the sign of whichever signed operand has
// the larger magnitude, which is b exactly when b is the large operand
// xor the difference came out negative (complemented).
module tb_sign_result;
  logic sign_a, sign_b, sign_in, eff_sub, swap, complement_out, sign_r;
  int checks = 0, failures = 0;
  sign_result dut (.*);
  initial begin : watchdog
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    bit b_wins, want;
    for (int i = 0; i < 64; i++) begin
      {sign_a, sign_b, sign_in, swap, complement_out, eff_sub} = 6'(i);
      #1;
      if (!eff_sub) want = sign_a;
      else begin
        b_wins = (swap != complement_out);
        want = b_wins ? (sign_b != sign_in) : sign_a;
      end
      checks++;
      if (sign_r !== want) failures++;
    end
    // Table 3.10 rows with effective addition: result sign = sign of a
    {sign_a, sign_b, sign_in, eff_sub, swap, complement_out} = 6'b110_0_1_0; #1;
    checks++; if (sign_r !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
