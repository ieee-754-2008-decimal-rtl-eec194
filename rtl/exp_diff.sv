// exp_diff: exponent difference and shift amounts for operand alignment.
// Combinational. Counts the leading zero digits of both 16-digit BCD
// significands and forms each operand's effective exponent (exponent minus
// leading zeros). The operand with the larger effective exponent is the
// large operand (operand a on a tie; a zero operand is the large one only
// when both are zero); swap is 1 when that is operand b.
// With eL/eS the exponents of the large/small operand and lzL the leading
// zeros of the large one:
//   eL >= eS : left_amount  = min(eL - eS, lzL)          (large shifted left)
//              right_amount = eL - eS - left_amount      (small shifted right)
//              er_int_out   = eL - left_amount
//   eL <  eS : left_small_amount = eS - eL              (small shifted left)
//              er_int_out   = eL                         (= min(ea, eb))
// right_amount saturates at 20: a small operand shifted that far only feeds
// the sticky bit. When both operands are zero the common exponent is
// min(ea, eb) and no shift is requested.
// The leading-zero / effective-exponent selection and the left/right shift
// formulas follow the original design. Shifting the small operand left
// only to the large one's exponent (instead of left-normalising both) and
// excluding zero operands from being the large one are this design's own
// choices; they yield the same results with the preferred exponent directly.
module exp_diff
  import dfp_pkg::*;
(
  input  logic [SIG_W-1:0] na1,
  input  logic [SIG_W-1:0] nb1,
  input  logic [EXP_W-1:0] ea,
  input  logic [EXP_W-1:0] eb,
  output logic             swap,
  output logic [4:0]       left_amount,
  output logic [4:0]       right_amount,
  output logic [4:0]       left_small_amount,
  output logic [EXP_W-1:0] er_int_out,
  output logic [EXP_W-1:0] emin
);
  logic [4:0]       na_zero, nb_zero;
  logic signed [11:0] eff_a, eff_b;
  logic [EXP_W-1:0] e_l, e_s;
  logic [4:0]       lz_l;
  logic [EXP_W-1:0] diff;

  lzd16 u_lza (.sig(na1), .lz(na_zero));
  lzd16 u_lzb (.sig(nb1), .lz(nb_zero));

  assign eff_a = signed'({2'b00, ea}) - signed'({7'd0, na_zero});
  assign eff_b = signed'({2'b00, eb}) - signed'({7'd0, nb_zero});
  assign emin  = (ea < eb) ? ea : eb;

  always_comb begin
    if (na_zero == 5'd16)      swap = (nb_zero != 5'd16);
    else if (nb_zero == 5'd16) swap = 1'b0;
    else                       swap = (eff_b > eff_a);

    e_l  = swap ? eb : ea;
    e_s  = swap ? ea : eb;
    lz_l = swap ? nb_zero : na_zero;
    diff = '0;

    left_amount       = '0;
    right_amount      = '0;
    left_small_amount = '0;
    er_int_out        = e_l;

    if (lz_l == 5'd16) begin
      // both operands are zero
      er_int_out = emin;
    end else if (e_l >= e_s) begin
      diff = e_l - e_s;
      left_amount  = (diff > EXP_W'(lz_l)) ? lz_l : diff[4:0];
      er_int_out   = e_l - EXP_W'(left_amount);
      right_amount = (diff - EXP_W'(left_amount) > EXP_W'(20)) ? 5'd20
                     : 5'(diff - EXP_W'(left_amount));
    end else begin
      diff = e_s - e_l;
      // bounded by the small operand's leading zeros unless it is zero
      left_small_amount = (diff > EXP_W'(16)) ? 5'd16 : diff[4:0];
    end
  end
endmodule
