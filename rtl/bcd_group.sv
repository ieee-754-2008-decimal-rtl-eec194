// bcd_group: carry-select group of the BCD adder (helper of bcd_adder).
// Two ripple chains of bcd_cell over GROUP digits, one assuming a carry-in
// of 0 and one of 1, computed in parallel. The caller picks sum and carry
// with the real carry-in. Combinational.
module bcd_group #(
  parameter int unsigned GROUP = 4
) (
  input  logic [4*GROUP-1:0] a,
  input  logic [4*GROUP-1:0] b,
  input  logic               operation,
  output logic [4*GROUP-1:0] sum0,
  output logic [4*GROUP-1:0] sum1,
  output logic               cout0,
  output logic               cout1
);
  logic [GROUP:0] c0, c1;

  assign c0[0] = 1'b0;
  assign c1[0] = 1'b1;
  for (genvar i = 0; i < GROUP; i++) begin : g_cell
    bcd_cell u_c0 (.inp_a(a[4*i +: 4]), .inp_b(b[4*i +: 4]), .cin(c0[i]), .operation(operation),
                   .sout(sum0[4*i +: 4]), .cout(c0[i+1]));
    bcd_cell u_c1 (.inp_a(a[4*i +: 4]), .inp_b(b[4*i +: 4]), .cin(c1[i]), .operation(operation),
                   .sout(sum1[4*i +: 4]), .cout(c1[i+1]));
  end
  assign cout0 = c0[GROUP];
  assign cout1 = c1[GROUP];
endmodule
