// carry_effect: end-around-carry logic of the nine's-complement subtractor.
// Combinational. In an effective subtraction a carry out of the most
// significant digit means the difference is positive: the carry is fed back
// as cin of the least significant digit. No carry means the difference is
// negative and the adder output must be nine's-complemented. In an
// effective addition both outputs are 0.
module carry_effect (
  input  logic eff_sub,
  input  logic carry_out,
  output logic cin,
  output logic complement_out
);
  assign cin            = eff_sub & carry_out;
  assign complement_out = eff_sub & ~carry_out;
endmodule
