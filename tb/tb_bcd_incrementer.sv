// tb_bcd_incrementer: random 16-digit numbers (many ending in runs of 9s)
// and the all-nines case; q must be (d + 1) mod 10^16 and cout set only on
// wrap-around.
module tb_bcd_incrementer;
  import tb_dfp_ref_pkg::*;
  logic [63:0] d, q;
  logic cout;
  int checks = 0, failures = 0;
  bcd_incrementer dut (.*);
  initial begin : watchdog
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    u128_t v;
    for (int i = 0; i < 3000; i++) begin
      v = 0;
      for (int j = 0; j < 16; j++) v = v * 10 + u128_t'($urandom_range(0, 9));
      if (i % 3 == 0) v = v - v % pow10($urandom_range(0, 16)) + pow10($urandom_range(0, 16)) - 1;
      v = v % pow10(16);
      if (i == 0) v = pow10(16) - 1;
      d = to_bcd(v)[63:0];
      #1; checks++;
      if (q !== to_bcd((v + 1) % pow10(16))[63:0] || cout !== (v == pow10(16) - 1)) begin
        failures++;
        if (failures < 5) $display("%0d -> %h %0d", v, q, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
