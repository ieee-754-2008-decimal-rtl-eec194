// tb_dpd_encode: exhaustive test of the declet encoder. For all 1000 digit
// triples the declet must equal the table encoding of tb_dfp_ref_pkg, be
// canonical, and decode back to the same triple.
module tb_dpd_encode;
  import tb_dfp_ref_pkg::*;
  logic [11:0] digits;
  logic [9:0]  declet;
  int checks = 0, failures = 0;

  dpd_encode dut (.digits(digits), .declet(declet));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1000; v++) begin
      digits = {4'(v / 100), 4'((v / 10) % 10), 4'(v % 10)};
      #1;
      checks++;
      if (declet !== dpd_enc(v) || dpd_dec(declet) != v) begin
        failures++;
        if (failures < 5) $display("%0d: got %b want %b", v, declet, dpd_enc(v));
      end
    end
    // two values from the format description: 999 -> 0011111111, 123 -> 0010100011
    digits = 12'h999; #1; checks++; if (declet !== 10'b0011111111) failures++;
    digits = 12'h123; #1; checks++; if (declet !== 10'b0010100011) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
