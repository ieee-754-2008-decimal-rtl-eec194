// tb_carry_effect: the four input combinations of the end-around-carry
// logic: addition gives no cin and no complement; subtraction with a
// carry gives cin; subtraction without a carry asks for complementation.
module tb_carry_effect;
  logic eff_sub, carry_out, cin, complement_out;
  int checks = 0, failures = 0;
  carry_effect dut (.*);
  initial begin : watchdog
    #1000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [1:0] want [4] = '{2'b00, 2'b00, 2'b01, 2'b10};  // {cin, complement_out}
    for (int i = 0; i < 4; i++) begin
      {eff_sub, carry_out} = 2'(i);
      #1; checks++;
      if ({cin, complement_out} !== want[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
