// shift_round: shift and round stage. Combinational.
// rounding_circuit normalises the adder result and classifies the discarded
// digits, round_decision decides on an increment for the selected mode,
// and bcd_incrementer adds one to the 16-digit coefficient. round selects
// the incremented value; a carry out of the incrementer (999..9 + 1) gives
// the coefficient 1000..0 and raises ex_adj so that the exponent grows by
// one. normalize, exp_zero and rslt_zero are passed to exp_adjust.
module shift_round
  import dfp_pkg::*;
(
  input  logic [75:0]      inter_result,
  input  logic             carry_out,
  input  logic             eff_sub,
  input  logic [EXP_W-1:0] er_int,
  input  logic [EXP_W-1:0] emin,
  input  logic [2:0]       round_mode,
  input  logic             sign_r,
  output logic [SIG_W-1:0] inter_result_1,
  output logic             ex_adj,
  output logic             normalize,
  output logic             exp_zero,
  output logic [4:0]       rslt_zero,
  output logic             inexact
);
  logic [SIG_W-1:0] coef, coef_inc;
  logic             round_flag, sticky, tie, round_up, inc_cout;

  rounding_circuit u_rc (
    .inter_result(inter_result), .carry_out(carry_out), .eff_sub(eff_sub),
    .er_int(er_int), .emin(emin), .coef(coef), .round_flag(round_flag),
    .sticky(sticky), .tie(tie), .inexact(inexact), .normalize(normalize),
    .exp_zero(exp_zero), .rslt_zero(rslt_zero));

  round_decision u_rd (
    .round_mode(round_mode), .sign_r(sign_r), .round_flag(round_flag),
    .sticky(sticky), .lsd_odd(coef[0]), .round_up(round_up));

  bcd_incrementer #(.DIGITS(DIGITS)) u_inc (.d(coef), .q(coef_inc), .cout(inc_cout));

  assign ex_adj         = round_up & inc_cout;
  assign inter_result_1 = !round_up ? coef
                        : (inc_cout ? {4'd1, {(SIG_W-4){1'b0}}} : coef_inc);
endmodule
