// rounding_circuit: normalisation and round-digit extraction of the
// 19-digit adder result (16 digits, guard, round, sticky digit).
// Combinational.
//  * normalize: a decimal carry of an effective addition makes the result
//    17 digits long; it is shifted right one digit (carry becomes the MSD).
//  * exp_zero / rslt_zero: otherwise, leading zero digits are removed by a
//    left shift of k = min(leading zeros, er_int - emin) digits, so the
//    exponent never drops below the preferred exponent min(ea, eb).
// After the shift the top 16 digits are the truncated coefficient, the next
// digit is the rounding digit and everything below is the sticky part.
//   round_flag = rounding digit >= 5
//   sticky     = discarded part is neither 0 nor exactly one half
// so (round_flag, sticky) = 00 exact, 01 below half, 10 tie, 11 above half.
// inexact is raised when anything non-zero is discarded.
// The normalize / exp_zero behaviour follows the original design; the exact
// definition of round_flag and sticky above is this design's reading of its
// rounding table.
module rounding_circuit
  import dfp_pkg::*;
(
  input  logic [75:0]      inter_result,
  input  logic             carry_out,
  input  logic             eff_sub,
  input  logic [EXP_W-1:0] er_int,
  input  logic [EXP_W-1:0] emin,
  output logic [SIG_W-1:0] coef,
  output logic             round_flag,
  output logic             sticky,
  output logic             tie,
  output logic             inexact,
  output logic             normalize,
  output logic             exp_zero,
  output logic [4:0]       rslt_zero
);
  logic [4:0]       lz;
  logic [EXP_W-1:0] room;
  logic [4:0]       k;
  logic [75:0]      shifted;
  logic [3:0]       rd;
  logic             rest;

  lzd16 u_lz (.sig(inter_result[75:12]), .lz(lz));

  assign normalize = carry_out & ~eff_sub;
  assign room      = er_int - emin;   // er_int >= emin by construction

  always_comb begin
    k = (room < EXP_W'(lz)) ? room[4:0] : lz;
    if (normalize) begin
      k       = '0;
      shifted = {4'd1, inter_result[75:4]};
      rest    = |inter_result[11:0];
    end else begin
      shifted = inter_result << (4 * k);
      rest    = |shifted[7:0];
    end
    coef       = shifted[75:12];
    rd         = shifted[11:8];
    round_flag = (rd >= 4'd5);
    tie        = (rd == 4'd5) && !rest;
    sticky     = ((rd != 4'd0) && (rd != 4'd5)) || rest;
    inexact    = (rd != 4'd0) || rest;
    exp_zero   = (k != 5'd0);
    rslt_zero  = k;
  end
endmodule
