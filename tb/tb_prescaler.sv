// tb_prescaler: test of the prescaler for single-precision significands.
// For every slice of the six leading divisor fraction bits, at both slice
// ends and at random points, the interval index, the signed-digit K*X/2 and
// the binary K*Y are compared with K = 1 - i/32 taken from an independent
// threshold table. The scaled divisor must satisfy 1 <= K*Y < 15/14, all
// digits must be legal and the integer digit must be 0 or 1.
module tb_prescaler;
  import nst_pkg::*;

  localparam int M  = 24;
  localparam int NF = 10;
  localparam int W  = 3 * NF;

  logic [M-1:0]       x, y;
  sd_digit_t          r_int;
  sd_digit_t [NF-1:0] r_frac;
  logic [M+4:0]       ys;
  logic [3:0]         k_idx;
  int                 checks = 0, failures = 0;

  prescaler #(.M(M), .NF(NF)) dut (.x, .y, .r_int, .r_frac, .ys, .k_idx);

  // upper interval ends, Y - 1 in units of 1/64
  int ends [16] = '{4, 6, 8, 10, 12, 16, 18, 22, 26, 30, 34, 40, 44, 50, 57, 64};

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int     idx, d64;
    longint one, kk, rv;
    bit     bad;
    one = longint'(1) << (M + 4);
    for (int t = 0; t < 64 * 200; t++) begin
      y = {1'b1, 6'(t % 64), 17'($urandom)};
      if (t / 64 == 0) y[16:0] = '0;
      if (t / 64 == 1) y[16:0] = '1;
      x = {1'b1, 23'($urandom)};
      if (t / 64 == 2) x = '1;
      #1;
      d64 = int'(y[M-2 -: 6]);
      idx = 0;
      while (d64 >= ends[idx]) idx++;
      kk = 32 - idx;
      rv = longint'(r_int);
      bad = (r_int != 4'sd0 && r_int != 4'sd1);
      for (int i = NF - 1; i >= 0; i--) begin
        rv = rv * 8 + longint'(r_frac[i]);
        if (r_frac[i] == -4'sd8) bad = 1;
      end
      checks++;
      if (bad || k_idx != 4'(idx) || rv * 32 != (longint'(x) * kk) << (W - M) || longint'(ys) != longint'(y) * kk ||
          longint'(ys) < one || 14 * longint'(ys) >= 15 * one) begin
        failures++;
        if (failures < 10) $display("FAIL y=%h x=%h: idx=%0d (exp %0d) R0=%0d ys=%h", y, x, k_idx, idx, rv, ys);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
