// tb_nst_r8_divider: end-to-end test of the whole divider at its default
// configuration: the single-precision and the double-precision unit run
// divisions at the same time. Each result and its flags are compared with the
// integer reference model; normal double-precision results are also compared
// with the simulator's own IEEE double division. Every division must take
// 11 (single) or 21 (double) cycles, start cycle included.
// Mechanisms counted in each unit, each of which must occur: all 16 prescale
// intervals, recode case 1 and case 2, a quotient digit saturated at +-7
// (leading value +-8), a negative final remainder (Q-1 chosen by the
// on-the-fly converter), both normalization outcomes, round-up, special
// operands, overflow and underflow.
module tb_nst_r8_divider;
  import nst_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int SP_OPS = 300000;
  localparam int DP_OPS = 150000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        sp_start = 1'b0, dp_start = 1'b0;
  logic [31:0] sp_a = '0, sp_b = '0, sp_result;
  logic [63:0] dp_a = '0, dp_b = '0, dp_result;
  logic        sp_busy, sp_done, dp_busy, dp_done;
  fp_flags_t   sp_flags, dp_flags;
  int          checks = 0, failures = 0;
  bit          sp_fin = 0, dp_fin = 0;

  nst_r8_divider dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  // index: 0 case1, 1 case2, 2 saturation, 3 negative remainder,
  //        4 quotient >= 1, 5 quotient < 1 (shift), 6 round up, 7 special,
  //        8 overflow, 9 underflow
  localparam int NMECH = 10;
  string mech_name [NMECH] = '{"recode case 1", "recode case 2", "digit saturation",
                               "negative remainder", "no normalize shift", "normalize shift",
                               "round up", "special operand", "overflow", "underflow"};
  int sp_mech [NMECH];
  int dp_mech [NMECH];
  int sp_int [16];
  int dp_int [16];

  always @(posedge clk) begin
    if (dut.u_sp.u_core.rec_case1) sp_mech[0]++;
    if (dut.u_sp.u_core.rec_case2) sp_mech[1]++;
    if (dut.u_sp.u_core.state == 2'd1 &&
        (8 * int'(dut.u_sp.u_core.r0_q) + int'(dut.u_sp.u_core.rf_q[9]) == 8 ||
         8 * int'(dut.u_sp.u_core.r0_q) + int'(dut.u_sp.u_core.rf_q[9]) == -8)) sp_mech[2]++;
    if (dut.u_sp.u_core.res_valid && !dut.u_sp.sp_q) begin
      if (dut.u_sp.u_core.rem_neg) sp_mech[3]++;
      if (dut.u_sp.quo[26]) sp_mech[4]++; else sp_mech[5]++;
      if (dut.u_sp.round_up) sp_mech[6]++;
      sp_int[dut.u_sp.u_core.k_idx]++;
    end
    if (dut.u_dp.u_core.rec_case1) dp_mech[0]++;
    if (dut.u_dp.u_core.rec_case2) dp_mech[1]++;
    if (dut.u_dp.u_core.state == 2'd1 &&
        (8 * int'(dut.u_dp.u_core.r0_q) + int'(dut.u_dp.u_core.rf_q[19]) == 8 ||
         8 * int'(dut.u_dp.u_core.r0_q) + int'(dut.u_dp.u_core.rf_q[19]) == -8)) dp_mech[2]++;
    if (dut.u_dp.u_core.res_valid && !dut.u_dp.sp_q) begin
      if (dut.u_dp.u_core.rem_neg) dp_mech[3]++;
      if (dut.u_dp.quo[56]) dp_mech[4]++; else dp_mech[5]++;
      if (dut.u_dp.round_up) dp_mech[6]++;
      dp_int[dut.u_dp.u_core.k_idx]++;
    end
    if (sp_done && sp_flags.overflow) sp_mech[8]++;
    if (sp_done && sp_flags.underflow) sp_mech[9]++;
    if (dp_done && dp_flags.overflow) dp_mech[8]++;
    if (dp_done && dp_flags.underflow) dp_mech[9]++;
  end

  // ---------------- operand generation ----------------
  function automatic logic [63:0] rand_op(int ew, int fw, int kind);
    logic [63:0] v, emax;
    longint      bias;
    emax = (64'd1 << ew) - 1;
    bias = (longint'(1) << (ew - 1)) - 1;
    v = {$urandom, $urandom} & ((64'd1 << (ew + fw + 1)) - 1);
    unique case (kind)
      0: v = (v & ~(emax << fw)) | (64'(bias + longint'($urandom_range(0, 60)) - 30) << fw);
      1: ;
      2: v = v & ~(emax << fw);                                  // zero / subnormal
      3: v = (v | (emax << fw)) & (($urandom_range(0, 1) == 1) ? ~((64'd1 << fw) - 1) : '1);
      default: begin                                             // prescale interval edges
        v = (v & ~(emax << fw)) | (64'(bias + longint'($urandom_range(0, 60)) - 30) << fw);
        v = v & ~((64'd1 << (fw - 6)) - 1);
        if ($urandom_range(0, 1) == 1) v = v | ((64'd1 << (fw - 6)) - 1);
      end
    endcase
    return v;
  endfunction

  function automatic int pick_kind();
    int r = $urandom_range(0, 39);
    if (r == 0) return 1;
    if (r == 1) return 2;
    if (r == 2) return 3;
    if (r < 12) return 4;
    return 0;
  endfunction

  // ---------------- single precision ----------------
  task automatic sp_one(input logic [31:0] ta, input logic [31:0] tb);
    logic [63:0] er;
    ref_flags_t  ef;
    int          cyc;
    ref_div(8, 23, {32'd0, ta}, {32'd0, tb}, er, ef);
    if (dut.u_sp.sp_c) sp_mech[7]++;
    sp_a <= ta; sp_b <= tb; sp_start <= 1'b1;
    @(posedge clk);
    sp_start <= 1'b0;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!sp_done && cyc < 100);
    checks += 2;
    if (sp_result != er[31:0] || sp_flags != fp_flags_t'(ef)) begin
      failures++;
      if (failures < 10) $display("FAIL sp %h / %h: got %h %b expected %h %b", ta, tb, sp_result, sp_flags, er[31:0], ef);
    end
    if (cyc != 11) begin
      failures++;
      if (failures < 10) $display("FAIL sp latency %0d", cyc);
    end
  endtask

  // ---------------- double precision ----------------
  task automatic dp_one(input logic [63:0] ta, input logic [63:0] tb);
    logic [63:0] er, hw;
    ref_flags_t  ef;
    int          cyc;
    ref_div(11, 52, ta, tb, er, ef);
    if (dut.u_dp.sp_c) dp_mech[7]++;
    dp_a <= ta; dp_b <= tb; dp_start <= 1'b1;
    @(posedge clk);
    dp_start <= 1'b0;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!dp_done && cyc < 100);
    checks += 2;
    if (dp_result != er || dp_flags != fp_flags_t'(ef)) begin
      failures++;
      if (failures < 10) $display("FAIL dp %h / %h: got %h %b expected %h %b", ta, tb, dp_result, dp_flags, er, ef);
    end
    if (cyc != 21) begin
      failures++;
      if (failures < 10) $display("FAIL dp latency %0d", cyc);
    end
    if (er[62:52] != 11'd0 && er[62:52] != 11'h7FF && ta[62:52] != 11'd0 && tb[62:52] != 11'd0) begin
      hw = $realtobits($bitstoreal(ta) / $bitstoreal(tb));
      checks++;
      if (dp_result != hw) begin
        failures++;
        if (failures < 10) $display("FAIL dp %h / %h: got %h, IEEE double gives %h", ta, tb, dp_result, hw);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    fork
      begin
        sp_one(32'h3f800000, 32'h40400000);
        sp_one(32'h7f7fffff, 32'h00800000);
        sp_one(32'h00800000, 32'h7f7fffff);
        sp_one(32'h7fc00000, 32'h3f800000);
        for (int i = 0; i < SP_OPS; i++)
          sp_one(rand_op(8, 23, pick_kind()) [31:0], rand_op(8, 23, pick_kind()) [31:0]);
        sp_fin = 1;
      end
      begin
        dp_one(64'h3ff0000000000000, 64'h4008000000000000);
        dp_one(64'h7fefffffffffffff, 64'h0010000000000000);
        dp_one(64'h0010000000000000, 64'h7fefffffffffffff);
        dp_one(64'h7ff0000000000000, 64'h7ff0000000000000);
        for (int i = 0; i < DP_OPS; i++)
          dp_one(rand_op(11, 52, pick_kind()), rand_op(11, 52, pick_kind()));
        dp_fin = 1;
      end
    join
    repeat (2) @(posedge clk);
    for (int m = 0; m < NMECH; m++) begin
      $display("%-20s single %7d  double %7d", mech_name[m], sp_mech[m], dp_mech[m]);
      checks += 2;
      if (sp_mech[m] == 0) failures++;
      if (dp_mech[m] == 0) failures++;
    end
    for (int k = 0; k < 16; k++) begin
      $display("prescale interval %2d single %7d  double %7d", k, sp_int[k], dp_int[k]);
      checks += 2;
      if (sp_int[k] == 0) failures++;
      if (dp_int[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
