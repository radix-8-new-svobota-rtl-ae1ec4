// tb_nst_iteration: random test of one radix-8 NST recurrence step.
// Random divisors Y = 1 + D with D < 1/14 and remainders |R| < 1 (both random
// signed-digit words and chains of steps fed back, as in a real division) are
// applied. Each step must satisfy R' = 8R - q*Y exactly, keep |R'| < 1, give a
// legal quotient digit and an integer digit in -1..1. The recode cases are
// counted and must both occur.
module tb_nst_iteration;
  import nst_pkg::*;

  localparam int NF = 10;
  localparam int W  = 3 * NF;

  sd_digit_t          r0, q, r0_next;
  sd_digit_t [NF-1:0] rf, rf_next;
  logic [W-1:0]       d1, d3, d5, d7;
  logic               case1, case2;
  int                 checks = 0, failures = 0, n_case1 = 0, n_case2 = 0;

  nst_iteration #(.NF(NF)) dut (.r0, .rf, .d1, .d3, .d5, .d7, .q, .r0_next, .rf_next, .case1, .case2);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rem_value(sd_digit_t i0, sd_digit_t [NF-1:0] f);
    longint v = longint'(i0);
    for (int i = NF - 1; i >= 0; i--) v = v * 8 + longint'(f[i]);
    return v;
  endfunction

  task automatic step_check(longint dv);
    longint v, vn, one;
    bit     bad;
    one = longint'(1) << W;
    v   = rem_value(r0, rf);
    #1;
    vn  = rem_value(r0_next, rf_next);
    bad = (r0_next > 4'sd1) || (r0_next < -4'sd1) || (q == -4'sd8);
    for (int i = 0; i < NF; i++) if (rf_next[i] == -4'sd8) bad = 1;
    checks++;
    if (bad || vn != 8 * v - longint'(q) * (one + dv) || vn >= one || vn <= -one) begin
      failures++;
      if (failures < 10) $display("FAIL R=%0d D=%0d q=%0d R'=%0d", v, dv, q, vn);
    end
    if (case1) n_case1++;
    if (case2) n_case2++;
  endtask

  initial begin
    longint dv, one;
    one = longint'(1) << W;
    for (int t = 0; t < 20000; t++) begin
      dv = longint'($urandom) % (one / 14);
      if (t % 7 == 0) dv = one / 14 - 1 - longint'($urandom_range(0, 3));
      if (t % 7 == 1) dv = longint'($urandom_range(0, 3));
      d1 = W'(dv); d3 = W'(3 * dv); d5 = W'(5 * dv); d7 = W'(7 * dv);
      if (t % 2 == 0) begin
        // a whole division: R(0) non-negative octal digits, then feed back
        r0 = '0;
        for (int i = 0; i < NF; i++) rf[i] = 4'($urandom_range(0, 7));
        for (int k = 0; k < 12; k++) begin
          step_check(dv);
          r0 = r0_next;
          rf = rf_next;
        end
      end else begin
        // an arbitrary remainder inside (-1, 1)
        do begin
          r0 = 4'($signed($urandom_range(0, 2)) - 1);
          for (int i = 0; i < NF; i++) rf[i] = 4'($signed($urandom_range(0, 14)) - 7);
        end while (rem_value(r0, rf) >= one || rem_value(r0, rf) <= -one);
        step_check(dv);
      end
    end
    checks++;
    if (n_case1 == 0 || n_case2 == 0) failures++;
    $display("recode case 1: %0d, case 2: %0d", n_case1, n_case2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
