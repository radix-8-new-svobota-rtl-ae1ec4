// tb_compensation_unit: random test of the compensation unit. For random
// D < 1/14 and every quotient digit q in -7..7 the value of the output digit
// word must be exactly -q*D, every digit must be legal and have the sign
// opposite to q.
module tb_compensation_unit;
  import nst_pkg::*;

  localparam int NF = 10;
  localparam int W  = 3 * NF;

  sd_digit_t          q;
  logic [W-1:0]       d1, d3, d5, d7;
  sd_digit_t [NF-1:0] m;
  int                 checks = 0, failures = 0;

  compensation_unit #(.NF(NF)) dut (.q, .d1, .d3, .d5, .d7, .m);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint dv, val;
    bit     bad;
    for (int t = 0; t < 3000; t++) begin
      dv = longint'($urandom) % ((longint'(1) << W) / 14);
      if (t == 0) dv = (longint'(1) << W) / 14;       // largest D
      if (t == 1) dv = 0;
      d1 = W'(dv); d3 = W'(3 * dv); d5 = W'(5 * dv); d7 = W'(7 * dv);
      for (int iq = -7; iq <= 7; iq++) begin
        q = 4'(iq);
        #1;
        val = 0;
        bad = 0;
        for (int i = NF - 1; i >= 0; i--) begin
          val = val * 8 + longint'(m[i]);
          if (m[i] == -4'sd8) bad = 1;
          if (iq > 0 && m[i] > 4'sd0) bad = 1;
          if (iq < 0 && m[i] < 4'sd0) bad = 1;
        end
        checks++;
        if (bad || val != -longint'(iq) * dv) begin
          failures++;
          if (failures < 10) $display("FAIL q=%0d D=%0d got %0d", iq, dv, val);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
