// tb_recode_unit: exhaustive test of the recode unit over integer digit
// r0 in -1..1 and digits r1, r2 in -7..7. Checks that the value is kept
// (64*r0 + 8*r1 + r2 = 8*q + u), that q is a legal digit, that the case 1 and
// case 2 flags follow the MROR rule (leading value and second digit of
// opposite sign with |second| > 3), and that after recoding a second digit of
// opposite sign to q never exceeds 3 in magnitude.
module tb_recode_unit;
  import nst_pkg::*;

  sd_digit_t         r0, r1, r2, q;
  logic signed [4:0] u;
  logic              case1, case2;
  int                checks = 0, failures = 0;

  recode_unit dut (.r0, .r1, .r2, .q, .u, .case1, .case2);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, qi, ui;
    bit e1, e2;
    for (int i0 = -1; i0 <= 1; i0++)
      for (int i1 = -7; i1 <= 7; i1++)
        for (int i2 = -7; i2 <= 7; i2++) begin
          r0 = 4'(i0); r1 = 4'(i1); r2 = 4'(i2);
          #1;
          v  = 8 * i0 + i1;
          qi = int'(q);
          ui = int'(u);
          e1 = (v > 0) && (i2 < -3);
          e2 = (v < 0) && (i2 > 3);
          checks++;
          if (case1 != e1 || case2 != e2) begin
            failures++;
            $display("FAIL flags r0=%0d r1=%0d r2=%0d -> c1=%b c2=%b", i0, i1, i2, case1, case2);
          end
          // inputs the recurrence can produce: |8*R| < 8, hence |v| <= 8
          if (v <= 8 && v >= -8 && !(v == 8 && i2 > 0) && !(v == -8 && i2 < 0)) begin
            checks++;
            if (64 * i0 + 8 * i1 + i2 != 8 * qi + ui || qi > 7 || qi < -7) begin
              failures++;
              $display("FAIL value r0=%0d r1=%0d r2=%0d -> q=%0d u=%0d", i0, i1, i2, qi, ui);
            end
            checks++;
            if ((qi > 0 && ui < -3) || (qi < 0 && ui > 3) || ui > 8 || ui < -8) begin
              failures++;
              $display("FAIL bound r0=%0d r1=%0d r2=%0d -> q=%0d u=%0d", i0, i1, i2, qi, ui);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
