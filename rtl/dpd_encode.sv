// dpd_encode: three BCD digits -> canonical densely packed decimal declet.
// Combinational. The most significant bits of the three digits (which of
// them are 8 or 9) select one of eight layouts; small digits contribute their
// three low bits, large digits only their lowest bit, and the indicator bits
// b(6) b(7) b(8) (b(3) b(4)) record the layout. Only the 1000 canonical
// declets are produced. This is the IEEE 754-2008 encoding table.
module dpd_encode (
  input  logic [11:0] digits,  // d(1) in [11:8], d(2) in [7:4], d(3) in [3:0]
  output logic [9:0]  declet
);
  logic [3:0] d1, d2, d3;
  logic [0:9] b;

  assign {d1, d2, d3} = digits;

  always_comb begin
    unique case ({d1[3], d2[3], d3[3]})
      3'b000: b = {d1[2:0], d2[2:0], 1'b0, d3[2:0]};
      3'b001: b = {d1[2:0], d2[2:0], 1'b1, 2'b00, d3[0]};
      3'b010: b = {d1[2:0], d3[2:1], d2[0], 1'b1, 2'b01, d3[0]};
      3'b011: b = {d1[2:0], 2'b10, d2[0], 1'b1, 2'b11, d3[0]};
      3'b100: b = {d3[2:1], d1[0], d2[2:0], 1'b1, 2'b10, d3[0]};
      3'b101: b = {d2[2:1], d1[0], 2'b01, d2[0], 1'b1, 2'b11, d3[0]};
      3'b110: b = {d3[2:1], d1[0], 2'b00, d2[0], 1'b1, 2'b11, d3[0]};
      3'b111: b = {2'b00, d1[0], 2'b11, d2[0], 1'b1, 2'b11, d3[0]};
    endcase
  end

  assign declet = b;
endmodule
