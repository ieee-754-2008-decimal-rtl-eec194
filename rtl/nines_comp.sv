// nines_comp: nine's complement of one BCD digit (q = 9 - d).
// Combinational, gate level: q3 = ~(d3|d2|d1), q2 = d2^d1, q1 = d1, q0 = ~d0.
module nines_comp (
  input  logic [3:0] d,
  output logic [3:0] q
);
  assign q = {~(d[3] | d[2] | d[1]), d[2] ^ d[1], d[1], ~d[0]};
endmodule
