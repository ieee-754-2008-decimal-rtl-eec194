// bcd_cell: one-digit BCD adder/subtractor cell with correction unit.
// Combinational. For operation = 1 (subtract) inp_b is replaced by its
// nine's complement. The two digits and cin are added in a 4-bit binary
// ripple adder (sum = a ^ b ^ c, carry = ab + c(a + b) per bit); a binary
// sum above 9 (a binary carry, or 1x1x / 11xx patterns) is corrected by
// adding 0110 and produces the decimal carry cout.
module bcd_cell (
  input  logic [3:0] inp_a,
  input  logic [3:0] inp_b,
  input  logic       cin,
  input  logic       operation,
  output logic [3:0] sout,
  output logic       cout
);
  logic [3:0] b_nc, b_eff, s;
  logic [4:0] c;

  nines_comp u_nc (.d(inp_b), .q(b_nc));
  assign b_eff = operation ? b_nc : inp_b;

  assign c[0] = cin;
  for (genvar i = 0; i < 4; i++) begin : g_fa
    assign s[i]   = inp_a[i] ^ b_eff[i] ^ c[i];
    assign c[i+1] = (inp_a[i] & b_eff[i]) | (c[i] & (inp_a[i] | b_eff[i]));
  end

  assign cout = c[4] | (s[3] & (s[2] | s[1]));
  assign sout = s + (cout ? 4'd6 : 4'd0);
endmodule
