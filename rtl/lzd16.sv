// lzd16: leading-zero-digit counter for a 16-digit BCD significand
// (helper of exp_diff). Combinational; lz = 16 for an all-zero input.
module lzd16
  import dfp_pkg::*;
(
  input  logic [SIG_W-1:0] sig,
  output logic [4:0]       lz
);
  always_comb begin
    lz = 5'd16;
    for (int i = 0; i < DIGITS; i++) begin
      if (sig[4*i +: 4] != 4'd0) lz = 5'(DIGITS - 1 - i);
    end
  end
endmodule
