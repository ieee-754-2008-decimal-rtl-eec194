// tb_round_decision: checks the increment decision against the published
// rounding examples (5.5, 2.5, 1.6, 1.1, 1.0 and their negatives rounded to
// an integer in every mode), then exhaustively against a reference that
// rounds a value "q + fraction" numerically.
module tb_round_decision;
  logic [2:0] round_mode;
  logic sign_r, round_flag, sticky, lsd_odd, round_up;
  int checks = 0, failures = 0;

  round_decision dut (.*);

  initial begin : watchdog
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // value x10, then results for: away, zero, +inf, -inf, even, half up, half down
  int tbl [10][8] = '{
    '{ 55,  6,  5,  6,  5,  6,  6,  5},
    '{ 25,  3,  2,  3,  2,  2,  3,  2},
    '{ 16,  2,  1,  2,  1,  2,  2,  2},
    '{ 11,  2,  1,  2,  1,  1,  1,  1},
    '{ 10,  1,  1,  1,  1,  1,  1,  1},
    '{-10, -1, -1, -1, -1, -1, -1, -1},
    '{-11, -2, -1, -1, -2, -1, -1, -1},
    '{-16, -2, -1, -1, -2, -2, -2, -2},
    '{-25, -3, -2, -2, -3, -2, -3, -2},
    '{-55, -6, -5, -5, -6, -6, -6, -5}};
  int mode_of [7] = '{1, 4, 2, 3, 0, 5, 6};

  task automatic apply_value(int x10, int mode);
    int mag = x10 < 0 ? -x10 : x10;
    int f = mag % 10;
    sign_r = (x10 < 0); lsd_odd = 1'((mag / 10) % 2);
    round_flag = (f >= 5); sticky = (f != 0 && f != 5);
    round_mode = 3'(mode);
    #1;
  endtask

  initial begin
    int mag, want, f, q2;
    for (int r = 0; r < 10; r++)
      for (int c = 0; c < 7; c++) begin
        apply_value(tbl[r][0], mode_of[c]);
        mag = (tbl[r][0] < 0 ? -tbl[r][0] : tbl[r][0]) / 10 + int'(round_up);
        checks++;
        if ((tbl[r][0] < 0 ? -mag : mag) != tbl[r][c+1]) begin
          failures++;
          $display("value %0d mode %0d: got %0d want %0d", tbl[r][0], mode_of[c], mag, tbl[r][c+1]);
        end
      end
    // exhaustive: fraction f in tenths, last digit 2 or 3, both signs, 8 codes
    for (int m = 0; m < 8; m++)
      for (int s = 0; s < 2; s++)
        for (int q = 2; q < 4; q++)
          for (f = 0; f < 10; f++) begin
            apply_value((s ? -1 : 1) * (10 * q + f), m);
            q2 = 2 * f;  // fraction compared with one half in twentieths
            case (m)
              1: want = (f != 0);
              2: want = (f != 0) && !s;
              3: want = (f != 0) && s;
              4: want = 0;
              5: want = (q2 >= 10);
              6: want = (q2 > 10);
              default: want = (q2 > 10) || (q2 == 10 && (q % 2 == 1));
            endcase
            checks++;
            if (round_up !== 1'(want)) failures++;
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
