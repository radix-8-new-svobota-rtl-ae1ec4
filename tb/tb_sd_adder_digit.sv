// tb_sd_adder_digit: exhaustive test of one signed-digit adder position.
// For every digit pair a, b in -7..7 and every incoming transfer -1..1 it
// checks a + b + cin = 8*cout + s, that s is a legal digit, that cout does not
// depend on cin (no carry chain) and the digit coding (-7 = 1001 ... -1 = 1111).
module tb_sd_adder_digit;
  import nst_pkg::*;

  sd_digit_t a, b, s;
  sd_carry_t cin, cout;
  int        checks = 0, failures = 0;

  sd_adder_digit dut (.a, .b, .cin, .cout, .s);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sd_carry_t c_ref;
    for (int ia = -7; ia <= 7; ia++) begin
      for (int ib = -7; ib <= 7; ib++) begin
        for (int ic = -1; ic <= 1; ic++) begin
          a = 4'(ia); b = 4'(ib); cin = 2'(ic);
          #1;
          if (ic == -1) c_ref = cout;
          checks++;
          if (ia + ib + ic != 8 * int'(cout) + int'(s) || int'(s) > 7 || int'(s) < -7 ||
              int'(cout) > 1 || int'(cout) < -1 || cout != c_ref) begin
            failures++;
            $display("FAIL a=%0d b=%0d cin=%0d -> cout=%0d s=%0d", ia, ib, ic, cout, s);
          end
          // interim sum must stay in -6..6
          checks++;
          if (ia + ib - 8 * int'(cout) > 6 || ia + ib - 8 * int'(cout) < -6) begin
            failures++;
            $display("FAIL interim a=%0d b=%0d cout=%0d", ia, ib, cout);
          end
        end
      end
    end
    // digit coding: a = -7 must read 1001, b = -1 1111
    a = 4'b1001; b = 4'b1111; cin = 2'sd0;
    #1;
    checks++;
    if (cout != -2'sd1 || s != 4'sd0) begin
      failures++;
      $display("FAIL coding: -7 + -1 gave cout=%0d s=%0d", cout, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
