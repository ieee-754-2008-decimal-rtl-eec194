// sign_result: sign of a finite result. Combinational.
// Effective addition: the sign of operand a. Effective subtraction: the
// result takes the sign of the subtrahend side, sign_in ^ sign_b, when
// exactly one of "operand b is the large operand" (swap) and "the adder
// output was complemented" holds; otherwise the sign of operand a.
// The sign of an exact zero difference is fixed later in dpf_converter.
module sign_result (
  input  logic sign_a,
  input  logic sign_b,
  input  logic sign_in,
  input  logic eff_sub,
  input  logic swap,
  input  logic complement_out,
  output logic sign_r
);
  assign sign_r = (eff_sub && (swap ^ complement_out)) ? (sign_in ^ sign_b) : sign_a;
endmodule
