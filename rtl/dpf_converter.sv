// dpf_converter: packs the result into Decimal64 DPD and applies the
// special-value and exception rules. Combinational.
// Finite result: combination field from the two top exponent bits and the
// leading digit (0xxxx/10xxx for digits 0..7, 11xxx for 8 and 9), the low
// 8 exponent bits as continuation, and the 15 trailing digits as five
// declets (dpd_encode). Priority of the special cases:
//   1. either operand sNaN  -> qNaN 0 11111 0..0, invalid
//   2. either operand qNaN  -> the same qNaN, no invalid
//   3. a infinite: b infinite and effective subtraction -> qNaN, invalid;
//      otherwise infinity with the sign of a
//   4. b infinite           -> infinity with sign sign_in ^ sign_b
//   5. overflow (max)       -> largest finite number for round toward zero,
//      toward +inf with a negative result and toward -inf with a positive
//      one, infinity otherwise; overflow and inexact raised
//   6. an exact zero difference is +0, or -0 when rounding toward -inf.
// These rules follow the original design, except that infinity minus
// infinity raises invalid (as IEEE 754-2008 requires) and infinities are
// always produced in canonical form; both are this design's choices.
module dpf_converter
  import dfp_pkg::*;
(
  input  unpacked_t        a,
  input  unpacked_t        b,
  input  logic             sign_in,
  input  logic             eff_sub,
  input  logic [2:0]       round_mode,
  input  logic             sign_r,
  input  logic [EXP_W-1:0] er,
  input  logic [SIG_W-1:0] coef,
  input  logic             max,
  input  logic             inexact_in,
  output logic [63:0]      result,
  output logic             inexact,
  output logic             overflow,
  output logic             invalid
);
  logic [49:0] trailing;
  logic [3:0]  lead;
  logic [4:0]  g;
  logic        sign_f;
  logic        to_max;

  for (genvar i = 0; i < 5; i++) begin : g_enc
    dpd_encode u_enc (.digits(coef[12*i +: 12]), .declet(trailing[10*i +: 10]));
  end

  assign lead   = coef[63:60];
  assign g      = lead[3] ? {2'b11, er[9:8], lead[0]} : {er[9:8], lead[2:0]};
  assign sign_f = (eff_sub && coef == '0) ? (round_mode == RM_NEG_INF) : sign_r;
  assign to_max = (round_mode == RM_ZERO)
               || (round_mode == RM_POS_INF && sign_r)
               || (round_mode == RM_NEG_INF && !sign_r);

  always_comb begin
    result   = {sign_f, g, er[7:0], trailing};
    inexact  = inexact_in;
    overflow = 1'b0;
    invalid  = 1'b0;
    if (a.cls == CLS_SNAN || b.cls == CLS_SNAN) begin
      result  = QNAN_RESULT;
      inexact = 1'b0;
      invalid = 1'b1;
    end else if (a.cls == CLS_QNAN || b.cls == CLS_QNAN) begin
      result  = QNAN_RESULT;
      inexact = 1'b0;
    end else if (a.cls == CLS_INF) begin
      inexact = 1'b0;
      if (b.cls == CLS_INF && eff_sub) begin
        result  = QNAN_RESULT;
        invalid = 1'b1;
      end else begin
        result  = {a.sign, INF_BODY};
      end
    end else if (b.cls == CLS_INF) begin
      inexact = 1'b0;
      result  = {sign_in ^ b.sign, INF_BODY};
    end else if (max) begin
      result   = {sign_r, to_max ? MAX_BODY : INF_BODY};
      overflow = 1'b1;
      inexact  = 1'b1;
    end
  end
endmodule
