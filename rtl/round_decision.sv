// round_decision: increment decision for seven rounding modes.
// Combinational. Inputs are the classified discarded fraction
// (round_flag, sticky: 00 exact, 01 below half, 10 exactly half, 11 above
// half), the result sign and the parity of the last kept digit.
//   000 nearest, ties to even   001 away from zero   010 toward +inf
//   011 toward -inf             100 toward zero      101 half up (ties away)
//   110 half down (ties toward zero); the unused code 111 behaves as 000.
// The codes and the decision table follow the original design; the
// treatment of code 111 is this design's choice.
module round_decision
  import dfp_pkg::*;
(
  input  logic [2:0] round_mode,
  input  logic       sign_r,
  input  logic       round_flag,
  input  logic       sticky,
  input  logic       lsd_odd,
  output logic       round_up
);
  logic nonzero;
  assign nonzero = round_flag | sticky;

  always_comb begin
    unique case (round_mode)
      RM_AWAY_ZERO: round_up = nonzero;
      RM_POS_INF:   round_up = nonzero & ~sign_r;
      RM_NEG_INF:   round_up = nonzero & sign_r;
      RM_ZERO:      round_up = 1'b0;
      RM_HALF_UP:   round_up = round_flag;
      RM_HALF_DOWN: round_up = round_flag & sticky;
      default:      round_up = round_flag & (sticky | lsd_odd);  // 000 and 111
    endcase
  end
endmodule
