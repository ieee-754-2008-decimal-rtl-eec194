// tb_rounding_circuit: random 19-digit adder results. Reference: with a
// decimal carry of an addition the 20-digit value 10^19 + V keeps its top 16
// digits; otherwise V is multiplied by 10^k, k = min(leading zeros of the
// top 16 digits, er_int - emin), and the top 16 of its 19 digits are kept.
// The first dropped digit and the rest classify the fraction.
module tb_rounding_circuit;
  import tb_dfp_ref_pkg::*;
  logic [75:0] inter_result;
  logic        carry_out, eff_sub, round_flag, sticky, tie, inexact, normalize, exp_zero;
  logic [9:0]  er_int, emin;
  logic [63:0] coef;
  logic [4:0]  rslt_zero;
  int checks = 0, failures = 0;

  rounding_circuit dut (.*);

  initial begin : watchdog
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    u128_t v, w, c, fr;
    int k, lz, room, rd;
    bit nrm;
    for (int i = 0; i < 5000; i++) begin
      v = 0;
      for (int j = $urandom_range(0, 19); j > 0; j--) v = v * 10 + u128_t'($urandom_range(0, 9));
      inter_result = to_bcd(v)[75:0];
      carry_out = 1'($urandom); eff_sub = 1'($urandom);
      emin = 10'($urandom_range(0, 700));
      room = $urandom_range(0, 3) == 0 ? $urandom_range(0, 60) : $urandom_range(0, 3);
      er_int = emin + 10'(room);
      #1;
      nrm = carry_out && !eff_sub;
      if (nrm) begin
        w = pow10(19) + v; c = w / pow10(4); fr = w % pow10(4); rd = int'(fr / 1000); fr = fr % 1000; k = 0;
      end else begin
        lz = 16 - ndigits(v / 1000);
        k = (room < lz) ? room : lz;
        w = (v * pow10(k)) % pow10(19);
        c = w / 1000; rd = int'((w / 100) % 10); fr = w % 100;
      end
      checks++;
      if (coef !== to_bcd(c)[63:0] || normalize !== nrm || rslt_zero !== 5'(k) || exp_zero !== (k != 0)
          || round_flag !== (rd >= 5) || tie !== (rd == 5 && fr == 0)
          || sticky !== ((rd != 0 && rd != 5) || fr != 0) || inexact !== (rd != 0 || fr != 0)) begin
        failures++;
        if (failures < 5) $display("v=%0d c=%0d s=%0d room=%0d: coef=%h k=%0d", v, carry_out, eff_sub, room, coef, rslt_zero);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
