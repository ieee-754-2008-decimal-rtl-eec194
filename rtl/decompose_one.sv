// decompose_one: unpacks one Decimal64 operand (helper of decompose).
// Combinational: combination-field decode plus five dpd_decode instances.
// Output: sign, 10-bit biased exponent, 16 BCD digits and the class.
// For infinities and NaNs the exponent and significand fields are
// don't-care values (the special-value path does not use them).
module decompose_one
  import dfp_pkg::*;
(
  input  logic [63:0] operand,
  output unpacked_t   u
);
  logic [4:0]  g;
  logic [7:0]  f;
  logic [59:0] trailing;  // 15 BCD digits from the five declets
  logic [3:0]  lead;
  logic [1:0]  exp_hi;

  assign g = operand[62:58];
  assign f = operand[57:50];

  for (genvar i = 0; i < 5; i++) begin : g_declet
    dpd_decode u_dec (.declet(operand[10*i +: 10]), .digits(trailing[12*i +: 12]));
  end

  always_comb begin
    if (g[4:3] == 2'b11) begin
      exp_hi = g[2:1];
      lead   = {3'b100, g[0]};
    end else begin
      exp_hi = g[4:3];
      lead   = {1'b0, g[2:0]};
    end
    u.sign = operand[63];
    u.exp  = {exp_hi, f};
    u.sig  = {lead, trailing};
    if (g == 5'b11111)      u.cls = operand[57] ? CLS_SNAN : CLS_QNAN;
    else if (g == 5'b11110) u.cls = CLS_INF;
    else                    u.cls = CLS_FINITE;
  end
endmodule
