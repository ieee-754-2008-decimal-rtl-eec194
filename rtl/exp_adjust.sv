// exp_adjust: final exponent. Combinational.
// er = er_int + normalize + ex_adj - (exp_zero ? rslt_zero : 0), computed
// with two spare bits. When er exceeds EMAX_BIASED (767, the largest biased
// exponent of a 16-digit Decimal64 coefficient) max is raised (overflow)
// and er is forced to zero.
module exp_adjust
  import dfp_pkg::*;
#(
  parameter int unsigned EMAX = EMAX_BIASED
) (
  input  logic [EXP_W-1:0] er_int,
  input  logic             normalize,
  input  logic             ex_adj,
  input  logic             exp_zero,
  input  logic [4:0]       rslt_zero,
  output logic [EXP_W-1:0] er,
  output logic             max
);
  logic [EXP_W+1:0] sum;

  assign sum = (EXP_W+2)'(er_int) + (EXP_W+2)'(normalize) + (EXP_W+2)'(ex_adj)
             - (exp_zero ? (EXP_W+2)'(rslt_zero) : '0);
  assign max = (sum > (EXP_W+2)'(EMAX));
  assign er  = max ? '0 : sum[EXP_W-1:0];
endmodule
