// tb_nines_comp: all ten BCD digits, q must equal 9 - d.
module tb_nines_comp;
  logic [3:0] d, q;
  int checks = 0, failures = 0;
  nines_comp dut (.d(d), .q(q));
  initial begin : watchdog
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 10; i++) begin
      d = 4'(i); #1; checks++;
      if (q !== 4'(9 - i)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
