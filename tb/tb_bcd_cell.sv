// tb_bcd_cell: exhaustive test of the one-digit BCD adder/subtractor cell:
// every digit pair, carry-in and operation. Expected: s = a + (op ? 9 - b : b)
// + cin, sout = s mod 10, cout = (s >= 10).
module tb_bcd_cell;
  logic [3:0] inp_a, inp_b, sout;
  logic cin, operation, cout;
  int checks = 0, failures = 0;
  bcd_cell dut (.*);
  initial begin : watchdog
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int s;
    for (int a = 0; a < 10; a++) for (int b = 0; b < 10; b++)
      for (int c = 0; c < 2; c++) for (int op = 0; op < 2; op++) begin
        inp_a = 4'(a); inp_b = 4'(b); cin = 1'(c); operation = 1'(op);
        #1;
        s = a + (op ? 9 - b : b) + c;
        checks++;
        if (sout !== 4'(s % 10) || cout !== (s >= 10)) begin
          failures++;
          if (failures < 5) $display("a=%0d b=%0d c=%0d op=%0d -> %0d %0d", a, b, c, op, cout, sout);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
