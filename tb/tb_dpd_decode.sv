// tb_dpd_decode: exhaustive test of the declet decoder. All 1024 declets,
// canonical and noncanonical, are decoded and compared with the decoding
// table written as integer arithmetic in tb_dfp_ref_pkg.
module tb_dpd_decode;
  import tb_dfp_ref_pkg::*;
  logic [9:0]  declet;
  logic [11:0] digits;
  int checks = 0, failures = 0;

  dpd_decode dut (.declet(declet), .digits(digits));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    for (int x = 0; x < 1024; x++) begin
      declet = 10'(x);
      #1;
      v = dpd_dec(declet);
      checks++;
      if (digits !== {4'(v / 100), 4'((v / 10) % 10), 4'(v % 10)}) begin
        failures++;
        if (failures < 5) $display("declet %b: got %h want %0d", declet, digits, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
