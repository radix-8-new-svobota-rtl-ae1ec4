// tb_sd_adder: random test of the N-digit carry-free signed-digit adder.
// The value of the sum word plus cout*8^N must equal the sum of the two
// input words plus cin, all digits must be legal, and changing cin may change
// digit 0 only (no transfer ripples).
module tb_sd_adder;
  import nst_pkg::*;

  localparam int N = 10;

  sd_digit_t [N-1:0] a, b, s, s0;
  sd_carry_t         cin, cout;
  int                checks = 0, failures = 0;

  sd_adder #(.N(N)) dut (.a, .b, .cin, .s, .cout);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint word_value(sd_digit_t [N-1:0] w);
    longint v = 0;
    for (int i = N - 1; i >= 0; i--) v = v * 8 + longint'(w[i]);
    return v;
  endfunction

  initial begin
    longint p8n;
    bit     bad;
    p8n = longint'(1) << (3 * N);
    for (int t = 0; t < 20000; t++) begin
      for (int i = 0; i < N; i++) begin
        a[i] = 4'($signed($urandom_range(0, 14)) - 7);
        b[i] = 4'($signed($urandom_range(0, 14)) - 7);
        if (t % 4 == 0) b[i] = a[i];            // many large sums
      end
      cin = 2'($signed($urandom_range(0, 2)) - 1);
      #1;
      checks++;
      bad = 0;
      for (int i = 0; i < N; i++) if (s[i] == -4'sd8) bad = 1;
      if (bad || word_value(s) + longint'(cout) * p8n != word_value(a) + word_value(b) + longint'(cin)) begin
        failures++;
        if (failures < 10) $display("FAIL value t=%0d", t);
      end
      s0  = s;
      cin = (cin == 2'sd0) ? 2'sd1 : 2'sd0;
      #1;
      checks++;
      if (s[N-1:1] != s0[N-1:1]) begin
        failures++;
        if (failures < 10) $display("FAIL transfer rippled t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
