// tb_nst_divider_core: test of the single-precision significand divider.
// Random significands X, Y in [1, 2) (and the extreme values) are divided;
// quo must equal floor(X / (2Y) * 8^ND) and sticky must tell whether the
// division was exact, both worked out by integer division. res_valid must come
// ND + 1 cycles after the start cycle. Negative final remainders (Q-1 chosen)
// and both recode cases must occur.
module tb_nst_divider_core;

  localparam int M  = 24;
  localparam int ND = 9;
  localparam int QW = 3 * ND;

  logic            clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [M-1:0]    x = '0, y = '0;
  logic            busy, res_valid, sticky, rec_case1, rec_case2, rem_neg;
  logic [QW-1:0]   quo;
  logic [3:0]      k_idx;
  int              checks = 0, failures = 0, n_neg = 0, n_c1 = 0, n_c2 = 0, n_exact = 0;

  nst_divider_core #(.M(M)) dut (
    .clk, .rst_n, .start, .x, .y, .busy, .res_valid, .quo, .sticky,
    .k_idx, .rec_case1, .rec_case2, .rem_neg
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rec_case1) n_c1++;
    if (rec_case2) n_c2++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] num, qq, rr;
    int           cyc;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 50000; t++) begin
      x = {1'b1, 23'($urandom)};
      y = {1'b1, 23'($urandom)};
      if (t == 0) begin x = '1; y = {1'b1, 23'd0}; end
      if (t == 1) begin y = '1; x = {1'b1, 23'd0}; end
      if (t % 5 == 2) x = y;                               // exact quotients
      if (t % 5 == 3) x = {1'b1, 23'($urandom) & 23'h7f0000};
      num = 128'(x) << (QW - 1);
      qq  = num / 128'(y);
      rr  = num % 128'(y);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      cyc = 0;
      do begin @(negedge clk); cyc++; end while (!res_valid && cyc < 100);
      checks++;
      if (quo != QW'(qq) || sticky != (rr != 0)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h quo=%h sticky=%b expected %h %b", x, y, quo, sticky, QW'(qq), rr != 0);
      end
      checks++;
      if (cyc != ND + 1) begin
        failures++;
        if (failures < 10) $display("FAIL res_valid after %0d cycles", cyc);
      end
      if (rem_neg) n_neg++;
      if (rr == 0) n_exact++;
      @(posedge clk);
    end
    checks++;
    if (n_neg == 0 || n_c1 == 0 || n_c2 == 0 || n_exact == 0) failures++;
    $display("negative remainders %0d, exact %0d, recode case 1 %0d, case 2 %0d", n_neg, n_exact, n_c1, n_c2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
