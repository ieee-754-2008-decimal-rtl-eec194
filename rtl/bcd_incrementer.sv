// bcd_incrementer: adds one to a DIGITS-digit BCD number. Combinational.
// A digit is set to 0 and passes the carry on when it is 9 and all digits
// below it are 9; the first digit below 9 is incremented. cout is set when
// every digit is 9 (the result then wraps to all zeros).
module bcd_incrementer #(
  parameter int unsigned DIGITS = 16
) (
  input  logic [4*DIGITS-1:0] d,
  output logic [4*DIGITS-1:0] q,
  output logic                cout
);
  logic [DIGITS:0] c;   // c[i]: all digits below i are 9

  assign c[0] = 1'b1;
  for (genvar i = 0; i < DIGITS; i++) begin : g_dig
    logic nine;
    assign nine   = (d[4*i +: 4] == 4'd9);
    assign c[i+1] = c[i] & nine;
    assign q[4*i +: 4] = !c[i] ? d[4*i +: 4] : (nine ? 4'd0 : d[4*i +: 4] + 4'd1);
  end
  assign cout = c[DIGITS];
endmodule
