// tb_shift_round: random 19-digit adder results, modes and signs. The
// reference keeps the 16 most significant digits after normalisation
// (decimal carry of an addition, or leading-zero removal limited by
// er_int - emin), rounds the dropped digits numerically for the selected
// mode, and expects 1000..0 with ex_adj when rounding carries out of 16
// digits. Half of the cases start from 99..9x results so that the
// rounding carry happens often.
module tb_shift_round;
  import tb_dfp_ref_pkg::*;
  logic [75:0] inter_result;
  logic        carry_out, eff_sub, sign_r, ex_adj, normalize, exp_zero, inexact;
  logic [9:0]  er_int, emin;
  logic [2:0]  round_mode;
  logic [63:0] inter_result_1;
  logic [4:0]  rslt_zero;
  int checks = 0, failures = 0, n_exadj = 0;

  shift_round dut (.*);

  initial begin : watchdog
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    u128_t v, w, c, fr, scale, half;
    int k, lz, room, m;
    bit nrm, up, wadj;
    for (int i = 0; i < 6000; i++) begin
      v = 0;
      for (int j = $urandom_range(0, 19); j > 0; j--) v = v * 10 + u128_t'($urandom_range(0, 9));
      if (i % 2 == 0) v = pow10(19) - 1 - u128_t'($urandom_range(0, 999));
      inter_result = to_bcd(v)[75:0];
      carry_out = 1'($urandom); eff_sub = 1'($urandom); sign_r = 1'($urandom);
      m = $urandom_range(0, 7); round_mode = 3'(m);
      emin = 10'($urandom_range(0, 700));
      room = $urandom_range(0, 3);
      er_int = emin + 10'(room);
      #1;
      nrm = carry_out && !eff_sub;
      if (nrm) begin w = pow10(19) + v; scale = pow10(4); k = 0; end
      else begin
        lz = 16 - ndigits(v / 1000);
        k = (room < lz) ? room : lz;
        w = (v * pow10(k)) % pow10(19); scale = 1000;
      end
      c = w / scale; fr = w % scale; half = scale / 2;
      case (m)
        1: up = fr != 0;
        2: up = fr != 0 && !sign_r;
        3: up = fr != 0 && sign_r;
        4: up = 0;
        5: up = fr >= half;
        6: up = fr > half;
        default: up = fr > half || (fr == half && c[0]);
      endcase
      c = c + u128_t'(up);
      wadj = (c == pow10(16));
      if (wadj) c = pow10(15);
      n_exadj += int'(wadj);
      checks++;
      if (inter_result_1 !== to_bcd(c)[63:0] || ex_adj !== wadj || normalize !== nrm
          || rslt_zero !== 5'(k) || inexact !== (fr != 0)) begin
        failures++;
        if (failures < 5) $display("v=%0d m=%0d s=%0d nrm=%0d: got %h adj %0d", v, m, sign_r, nrm, inter_result_1, ex_adj);
      end
    end
    checks++;
    if (n_exadj == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
