// tb_dfp_addsub64: end-to-end test of the Decimal64 adder/subtractor at its
// default (and only) configuration.
// A new operation is applied every clock cycle; each result is compared,
// two cycles later (the design's latency), with the integer reference model
// of tb_dfp_ref_pkg. Stimulus: the worked alignment examples, rounding-mode
// examples (x.5, x.6, x.1 ties and non-ties in all seven modes), overflow,
// NaN and infinity cases, then random operands with exponents close
// together or far apart, coefficients of random length, occasional zeros,
// all-nines coefficients, specials and exponents near the top of the range.
// Coverage counters record how often each datapath mechanism fired (decimal
// carry normalisation, end-around carry, complemented result, left shift
// of the large operand, left shift of the small operand, right shift into
// guard/round/sticky, leading-zero removal, rounding increment, rounding
// carry into the exponent, overflow, invalid, each rounding mode rounding
// up); a mechanism that never fired counts as a failure.
`timescale 1ns/1ps
module tb_dfp_addsub64;
  import tb_dfp_ref_pkg::*;

  localparam int N_RANDOM = 20000;

  logic        clk = 1'b0;
  logic        rst;
  logic [63:0] operand_a, operand_b, result;
  logic        sign_in, inexact, overflow, invalid;
  logic [2:0]  round_mode;

  dfp_addsub64 dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  typedef struct {
    logic [63:0] res;
    bit ix, ov, iv;
    logic [63:0] a, b;
    bit si;
    int rm;
    bit valid;
  } exp_t;
  exp_t pipe[1];

  // coverage
  int c_norm, c_eac, c_compl, c_left, c_lsmall, c_right, c_lzrm, c_inc, c_exadj,
      c_ovf, c_inv, c_inf, c_nan;
  int c_up[8];

  always @(posedge clk) if (!rst) begin
    if (dut.u_shift_round.normalize)      c_norm++;
    if (dut.u_bcd_adder.cin)              c_eac++;
    if (dut.u_bcd_adder.complement_out)   c_compl++;
    if (dut.left_amount != 0)             c_left++;
    if (dut.left_small_amount != 0)       c_lsmall++;
    if (dut.right_amount != 0)            c_right++;
    if (dut.u_shift_round.exp_zero)       c_lzrm++;
    if (dut.u_shift_round.u_rd.round_up) begin c_inc++; c_up[dut.rm_q]++; end
    if (dut.u_shift_round.ex_adj)         c_exadj++;
    if (dut.overflow_d)                   c_ovf++;
    if (dut.invalid_d)                    c_inv++;
    if (dut.result_d[62:58] == 5'b11110)  c_inf++;
    if (dut.result_d[62:58] == 5'b11111)  c_nan++;
  end

  task automatic apply(logic [63:0] a, logic [63:0] b, bit si, int rm);
    exp_t e;
    operand_a  <= a;
    operand_b  <= b;
    sign_in    <= si;
    round_mode <= 3'(rm);
    add(a, b, si, rm, e.res, e.ix, e.ov, e.iv);
    e.a = a; e.b = b; e.si = si; e.rm = rm; e.valid = 1;
    @(posedge clk);
    // the operation applied now is captured by the input registers at this
    // edge and its result by the output registers at the next one: the
    // output seen now belongs to the previous operation
    check_out();
    pipe[0] = e;
  endtask

  task automatic check_out();
    exp_t e = pipe[0];
    if (!e.valid) return;
    #1;
    checks++;
    if (result !== e.res || inexact !== e.ix || overflow !== e.ov || invalid !== e.iv) begin
      failures++;
      if (failures <= 10)
        $display("MISMATCH a=%h b=%h sub=%0d rm=%0d: got %h ix%0d ov%0d iv%0d, want %h ix%0d ov%0d iv%0d",
                 e.a, e.b, e.si, e.rm, result, inexact, overflow, invalid, e.res, e.ix, e.ov, e.iv);
    end
  endtask

  function automatic u128_t rand_coef();
    int nd = $urandom_range(0, 16);
    u128_t c = 0;
    int kind = $urandom_range(0, 9);
    if (kind == 0) return pow10(16) - 1;                       // all nines
    if (kind == 1) return pow10($urandom_range(0, 15));        // power of ten
    for (int i = 0; i < nd; i++) c = c * 10 + u128_t'($urandom_range(0, 9));
    return c;
  endfunction

  function automatic logic [63:0] rand_special();
    case ($urandom_range(0, 3))
      0: return {1'($urandom), 5'b11110, 58'($urandom)};           // infinity
      1: return {1'($urandom), 5'b11111, 1'b0, 57'($urandom)};     // qNaN
      2: return {1'($urandom), 5'b11111, 1'b1, 57'($urandom)};     // sNaN
      default: return {1'($urandom), 63'($urandom)};               // any pattern
    endcase
  endfunction

  initial begin : watchdog
    repeat (N_RANDOM + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb, rm;
    logic [63:0] a, b;
    rst = 1'b1;
    operand_a = '0; operand_b = '0; sign_in = 0; round_mode = 0;
    pipe[0].valid = 0;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (result !== 64'd0 || inexact || overflow || invalid) failures++;  // reset state
    rst <= 1'b0;

    // alignment example: 0786000000000000 x10^6 + 43720 x10^0
    apply(pack(0, 398 + 6, 786 * pow10(12)), pack(0, 398, 43720), 0, 0);
    // small operand with the larger exponent: 230786 0000 x10^7 + 4 x10^10
    apply(pack(0, 398 + 7, 2307860000), pack(0, 398 + 10, 4), 0, 0);
    apply(pack(0, 10, 14562345 * 10000 + 23), pack(0, 12, 23450023), 0, 0);
    apply(pack(0, 10, 14562345 * 10000 + 23), pack(0, 12, 23450023), 1, 0);
    // rounding examples: 9999999999999999 + x.5 / x.6 / x.1 in every mode
    for (int m = 0; m < 7; m++) begin
      for (int s = 0; s < 2; s++) begin
        apply(pack(s, 398, pow10(16) - 5), pack(s, 397, 55), 0, m);   // ...9995 + 5.5
        apply(pack(s, 398, pow10(16) - 6), pack(s, 397, 25), 0, m);   // ...9994 + 2.5
        apply(pack(s, 398, pow10(16) - 7), pack(s, 397, 16), 0, m);
        apply(pack(s, 398, pow10(16) - 7), pack(s, 397, 11), 0, m);
        apply(pack(s, 398, pow10(16) - 7), pack(s, 397, 10), 0, m);
        apply(pack(s, 398, pow10(15)), pack(s, 390, 1), 1, m);         // 10^15 - tiny
        apply(pack(s, 767, pow10(16) - 1), pack(s, 760, 5), 0, m);     // overflow
        apply(pack(s, 767, pow10(16) - 1), pack(s, 767, 1), 0, m);     // overflow by carry
      end
    end
    // specials
    apply(QNAN | 64'd5, pack(0, 398, 1), 0, 0);
    apply(pack(0, 398, 1), {1'b1, 5'b11111, 1'b1, 57'd7}, 0, 0);
    apply({1'b0, INF}, {1'b0, INF}, 1, 0);
    apply({1'b0, INF}, {1'b1, INF}, 1, 0);
    apply({1'b1, INF}, pack(0, 398, 1), 0, 0);
    apply(pack(0, 398, 1), {1'b0, INF}, 1, 0);
    apply(pack(0, 398, 0), pack(1, 300, 0), 0, 3);
    apply(pack(1, 398, 0), pack(1, 300, 0), 1, 0);
    apply(pack(0, 398, 123), pack(0, 398, 123), 1, 3);

    for (int i = 0; i < N_RANDOM; i++) begin
      ea = $urandom_range(0, 767);
      case ($urandom_range(0, 3))
        0: eb = ea + $urandom_range(0, 40) - 20;
        1: eb = ea + $urandom_range(0, 6) - 3;
        2: eb = $urandom_range(0, 767);
        default: begin ea = $urandom_range(740, 767); eb = ea - $urandom_range(0, 20); end
      endcase
      if (eb < 0) eb = 0;
      if (eb > 767) eb = 767;
      a = pack(1'($urandom), ea, rand_coef());
      b = pack(1'($urandom), eb, rand_coef());
      if ($urandom_range(0, 49) == 0) a = rand_special();
      if ($urandom_range(0, 49) == 0) b = rand_special();
      rm = $urandom_range(0, 7);
      apply(a, b, 1'($urandom), rm);
    end
    apply(pack(0, 398, 0), pack(0, 398, 0), 0, 0);
    apply(pack(0, 398, 0), pack(0, 398, 0), 0, 0);
    @(posedge clk);

    $display("coverage: normalize=%0d end_around_carry=%0d complement=%0d left=%0d left_small=%0d right=%0d lz_removal=%0d round_up=%0d ex_adj=%0d overflow=%0d invalid=%0d inf=%0d nan=%0d",
             c_norm, c_eac, c_compl, c_left, c_lsmall, c_right, c_lzrm, c_inc, c_exadj, c_ovf, c_inv, c_inf, c_nan);
    foreach (c_up[m]) if (m < 7 && m != 4) begin
      checks++;
      if (c_up[m] == 0) begin failures++; $display("mode %0d never rounded up", m); end
    end
    begin
      int cov[13];
      cov = '{c_norm, c_eac, c_compl, c_left, c_lsmall, c_right, c_lzrm, c_inc, c_exadj, c_ovf, c_inv, c_inf, c_nan};
      foreach (cov[j]) begin
        checks++;
        if (cov[j] == 0) begin failures++; $display("mechanism %0d never exercised", j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
