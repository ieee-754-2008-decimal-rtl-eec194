// sig_align: significand alignment. Combinational.
// Places the large operand on na2, shifted left by left_amount digits, and
// the small operand on nb2, which has 16 digits plus a guard digit, a round
// digit and a sticky bit (73 bits). The small operand is either shifted left
// by left_small_amount digits or right by right_amount digits; digits
// shifted past the round digit are ORed into the sticky bit.
module sig_align
  import dfp_pkg::*;
(
  input  logic [SIG_W-1:0]   na1,
  input  logic [SIG_W-1:0]   nb1,
  input  logic               swap,
  input  logic [4:0]         left_amount,
  input  logic [4:0]         right_amount,
  input  logic [4:0]         left_small_amount,
  output logic [SIG_W-1:0]   na2,
  output logic [SIG_W+8:0]   nb2
);
  logic [SIG_W-1:0] op_large, op_small;
  logic [143:0]     wide;   // 16 digits + guard + round, then 18 digits of sticky room

  assign op_large = swap ? nb1 : na1;
  assign op_small = swap ? na1 : nb1;
  assign na2   = op_large << (4 * left_amount);

  always_comb begin
    if (left_small_amount != 5'd0) begin
      nb2 = {op_small << (4 * left_small_amount), 8'h00, 1'b0};
      wide = '0;
    end else begin
      wide = {op_small, 80'd0} >> (4 * right_amount);
      nb2  = {wide[143:72], |wide[71:0]};
    end
  end
endmodule
