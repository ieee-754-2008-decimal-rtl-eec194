// dpd_decode: densely packed decimal declet -> three BCD digits.
// Pure combinational decoder of one 10-bit declet (declet[9] is b(0), the
// most significant bit) into digits d(1) d(2) d(3) (d(1) in digits[11:8]).
// Bits b(6) b(7) b(8) b(3) b(4) select which of the digits are "large"
// (8 or 9); a large digit is 8 + one declet bit, a small digit takes three
// declet bits. All 1024 patterns are accepted, the 24 noncanonical ones map
// onto the same digits as their canonical twins. This is the IEEE 754-2008
// decoding table, implemented directly.
module dpd_decode (
  input  logic [9:0]  declet,
  output logic [11:0] digits
);
  logic [0:9] b;  // b[0] is the most significant declet bit
  logic [3:0] d1, d2, d3;

  assign b = declet;

  always_comb begin
    d1 = {1'b0, b[0], b[1], b[2]};
    d2 = {1'b0, b[3], b[4], b[5]};
    d3 = {1'b0, b[7], b[8], b[9]};
    if (b[6]) begin
      unique casez ({b[7], b[8], b[3], b[4]})
        4'b00??: d3 = {3'b100, b[9]};
        4'b01??: begin d2 = {3'b100, b[5]}; d3 = {1'b0, b[3], b[4], b[9]}; end
        4'b10??: begin d1 = {3'b100, b[2]}; d3 = {1'b0, b[0], b[1], b[9]}; end
        4'b1100: begin d1 = {3'b100, b[2]}; d2 = {3'b100, b[5]}; d3 = {1'b0, b[0], b[1], b[9]}; end
        4'b1101: begin d1 = {3'b100, b[2]}; d2 = {1'b0, b[0], b[1], b[5]}; d3 = {3'b100, b[9]}; end
        4'b1110: begin d2 = {3'b100, b[5]}; d3 = {3'b100, b[9]}; end
        4'b1111: begin d1 = {3'b100, b[2]}; d2 = {3'b100, b[5]}; d3 = {3'b100, b[9]}; end
      endcase
    end
  end

  assign digits = {d1, d2, d3};
endmodule
