// decompose: unpacks the two Decimal64 operands and finds the effective
// operation. Combinational.
// Each operand is split into sign (bit 63), combination field G (62:58),
// exponent continuation F (57:50) and coefficient continuation T (49:0).
// G gives the two leading exponent bits and the leading digit (0..7 for
// G = 0xxxx/10xxx, 8 or 9 for G = 110xx/1110x) or marks infinity (11110) and
// NaN (11111, signalling when bit 57 is set). The five declets of T are
// decoded by dpd_decode into the 15 trailing BCD digits, giving a 16-digit
// BCD significand and a 10-bit biased exponent.
// The effective operation is a subtraction when sign_in (1 = subtract)
// and the two operand signs have odd parity: eff_sub = sign_in ^ sign_a ^ sign_b.
module decompose
  import dfp_pkg::*;
(
  input  logic [63:0] operand_a,
  input  logic [63:0] operand_b,
  input  logic        sign_in,
  output unpacked_t   a,
  output unpacked_t   b,
  output logic        eff_sub
);
  decompose_one u_a (.operand(operand_a), .u(a));
  decompose_one u_b (.operand(operand_b), .u(b));

  assign eff_sub = sign_in ^ operand_a[63] ^ operand_b[63];
endmodule
