// dfp_addsub64: IEEE 754-2008 Decimal64 adder/subtractor (DPD encoding).
// Computes operand_a + operand_b (sign_in = 0) or operand_a - operand_b
// (sign_in = 1), rounded to 16 digits with one of seven rounding modes
// (round_mode, see dfp_pkg::round_mode_e), with inexact, overflow and
// invalid flags.
// Single-path datapath: decompose (DPD -> BCD, effective operation) ->
// exp_diff (leading zeros, large operand, shift amounts, common exponent)
// -> sig_align (large operand left, small operand right into guard, round,
// sticky, or left) -> bcd_adder (19-digit nine's-complement BCD adder with
// carry-select groups and end-around carry) -> sign_result ->
// shift_round (normalise, round, increment) -> exp_adjust -> dpf_converter
// (BCD -> DPD, NaN/infinity/overflow handling).
// Timing: operands, sign_in and round_mode are registered on the rising
// clock edge, the whole datapath is one combinational stage, and result
// and flags are registered on the next edge: LATENCY = 2 cycles, one new
// operation accepted every cycle. rst is synchronous, active high, and
// clears both register stages. The register stages are this design's own
// choice; the datapath follows the block structure described for it.
module dfp_addsub64
  import dfp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [63:0] operand_a,
  input  logic [63:0] operand_b,
  input  logic        sign_in,
  input  logic [2:0]  round_mode,
  output logic [63:0] result,
  output logic        inexact,
  output logic        overflow,
  output logic        invalid
);
  // input registers
  logic [63:0] op_a_q, op_b_q;
  logic        sign_in_q;
  logic [2:0]  rm_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      op_a_q    <= '0;
      op_b_q    <= '0;
      sign_in_q <= 1'b0;
      rm_q      <= '0;
    end else begin
      op_a_q    <= operand_a;
      op_b_q    <= operand_b;
      sign_in_q <= sign_in;
      rm_q      <= round_mode;
    end
  end

  unpacked_t        ua, ub;
  logic             eff_sub, swap;
  logic [4:0]       left_amount, right_amount, left_small_amount;
  logic [EXP_W-1:0] er_int, emin, er;
  logic [SIG_W-1:0] na2, coef;
  logic [72:0]      nb2;
  logic [75:0]      inter_result;
  logic             carry_out, complement_out, sign_r;
  logic             ex_adj, normalize, exp_zero, rnd_inexact, max;
  logic [4:0]       rslt_zero;
  logic [63:0]      result_d;
  logic             inexact_d, overflow_d, invalid_d;

  decompose u_decompose (
    .operand_a(op_a_q), .operand_b(op_b_q), .sign_in(sign_in_q),
    .a(ua), .b(ub), .eff_sub(eff_sub));

  exp_diff u_exp_diff (
    .na1(ua.sig), .nb1(ub.sig), .ea(ua.exp), .eb(ub.exp), .swap(swap),
    .left_amount(left_amount), .right_amount(right_amount),
    .left_small_amount(left_small_amount), .er_int_out(er_int), .emin(emin));

  sig_align u_sig_align (
    .na1(ua.sig), .nb1(ub.sig), .swap(swap), .left_amount(left_amount),
    .right_amount(right_amount), .left_small_amount(left_small_amount),
    .na2(na2), .nb2(nb2));

  bcd_adder u_bcd_adder (
    .na2(na2), .nb2(nb2), .eff_sub(eff_sub), .inter_result(inter_result),
    .carry_out(carry_out), .complement_out(complement_out));

  sign_result u_sign_result (
    .sign_a(ua.sign), .sign_b(ub.sign), .sign_in(sign_in_q), .eff_sub(eff_sub),
    .swap(swap), .complement_out(complement_out), .sign_r(sign_r));

  shift_round u_shift_round (
    .inter_result(inter_result), .carry_out(carry_out), .eff_sub(eff_sub),
    .er_int(er_int), .emin(emin), .round_mode(rm_q), .sign_r(sign_r),
    .inter_result_1(coef), .ex_adj(ex_adj), .normalize(normalize),
    .exp_zero(exp_zero), .rslt_zero(rslt_zero), .inexact(rnd_inexact));

  exp_adjust u_exp_adjust (
    .er_int(er_int), .normalize(normalize), .ex_adj(ex_adj), .exp_zero(exp_zero),
    .rslt_zero(rslt_zero), .er(er), .max(max));

  dpf_converter u_dpf (
    .a(ua), .b(ub), .sign_in(sign_in_q), .eff_sub(eff_sub), .round_mode(rm_q),
    .sign_r(sign_r), .er(er), .coef(coef), .max(max), .inexact_in(rnd_inexact),
    .result(result_d), .inexact(inexact_d), .overflow(overflow_d), .invalid(invalid_d));

  // output registers
  always_ff @(posedge clk) begin
    if (rst) begin
      result   <= '0;
      inexact  <= 1'b0;
      overflow <= 1'b0;
      invalid  <= 1'b0;
    end else begin
      result   <= result_d;
      inexact  <= inexact_d;
      overflow <= overflow_d;
      invalid  <= invalid_d;
    end
  end
endmodule
