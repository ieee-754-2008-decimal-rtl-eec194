// tb_bcd_adder: random aligned operands. With A = na2 * 1000 and B = the 18
// digits of nb2 followed by the sticky digit (0 or 1), an effective
// addition must give (A + B) mod 10^19 with carry_out = (A + B >= 10^19);
// an effective subtraction gives |A - B| with complement_out set when
// A <= B (no end-around carry). Also checks the equal-operand case and
// full-length carry propagation (999...9 + 1).
module tb_bcd_adder;
  import tb_dfp_ref_pkg::*;
  logic [63:0] na2;
  logic [72:0] nb2;
  logic        eff_sub, carry_out, complement_out;
  logic [75:0] inter_result;
  int checks = 0, failures = 0;

  bcd_adder dut (.*);

  initial begin : watchdog
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(u128_t a16, u128_t b18, bit st, bit sub);
    u128_t A, B, want;
    bit wc, wcomp;
    na2 = to_bcd(a16)[63:0]; nb2 = {to_bcd(b18)[71:0], st}; eff_sub = sub;
    #1;
    A = a16 * 1000; B = b18 * 10 + u128_t'(st);
    if (!sub) begin
      want = (A + B) % pow10(19); wc = (A + B) >= pow10(19); wcomp = 0;
    end else begin
      wc = 0; wcomp = (A <= B); want = (A > B) ? A - B : B - A;
    end
    checks++;
    if (inter_result !== to_bcd(want)[75:0] || carry_out !== wc || complement_out !== wcomp) begin
      failures++;
      if (failures < 5) $display("A=%0d B=%0d sub=%0d: got %h c%0d k%0d want %0d", A, B, sub,
                                 inter_result, carry_out, complement_out, want);
    end
  endtask

  function automatic u128_t rnd(int maxd);
    u128_t c = 0;
    int nd = $urandom_range(0, maxd);
    for (int i = 0; i < nd; i++) c = c * 10 + u128_t'($urandom_range(0, 9));
    return c;
  endfunction

  initial begin
    u128_t a;
    run(pow10(16) - 1, pow10(18) - 1, 1, 0);
    run(0, 0, 1, 0);
    run(123, 12300, 0, 1);
    run(pow10(15), pow10(17) - 1, 1, 1);
    for (int i = 0; i < 5000; i++) begin
      a = rnd(16);
      if (i % 5 == 0) run(a, a * 100, 0, 1);                 // equal operands
      else run(a, rnd(18), 1'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
