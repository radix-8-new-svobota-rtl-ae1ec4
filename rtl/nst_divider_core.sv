// nst_divider_core: significand divider built on the radix-8 NST MROR
// recurrence. It computes the quotient of two normalized significands
// X, Y in [1, 2) as Qc = X / (2Y) in (1/4, 1), truncated to 3*ND bits, with a
// sticky bit telling whether anything was cut off.
//
// Flow (prescaling, iteration, registers):
//   cycle 0       start high: the prescaler scales both operands by K; the
//                 registers take R(0) = K*X/2 in signed digits, as the
//                 prescaler's carry-free adders deliver it, and D = K*Y - 1
//                 together with 3D, 5D and 7D;
//   cycles 1..ND  one nst_iteration step per cycle; each quotient digit goes
//                 into the on-the-fly converter;
//   cycle ND+1    res_valid: the final signed-digit remainder is reduced to
//                 its sign and zero flag (the only carry-propagate addition
//                 of the recurrence) and selects Q or Q-1 ulp.
// Because K*X / (K*Y) = X/Y and every step is exact, quo and sticky describe
// the exact quotient. ND = ceil((M+3)/3) digits leave room for normalization
// and a guard bit, which gives the original design's cycle counts (11 single,
// 21 double) once the rounding cycle of nst_fpdiv is added. start is taken
// only while idle (busy low). Asynchronous active-low reset.
module nst_divider_core
  import nst_pkg::*;
#(
  parameter int M  = 24,               // significand bits with hidden one (single precision)
  parameter int ND = (M + 5) / 3,      // quotient digits
  parameter int NF = (M + 7) / 3       // remainder fraction digits
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [M-1:0]      x,          // dividend significand 1.f
  input  logic [M-1:0]      y,          // divisor significand 1.f
  output logic              busy,
  output logic              res_valid,  // quo/sticky valid this cycle
  output logic [3*ND-1:0]   quo,        // floor(X/(2Y) * 8^ND)
  output logic              sticky,     // exact remainder non-zero
  output logic [3:0]        k_idx,      // prescale interval of this division
  output logic              rec_case1,  // recode case 1 in this step
  output logic              rec_case2,  // recode case 2 in this step
  output logic              rem_neg     // final remainder negative (Q-1 chosen)
);

  localparam int W   = 3 * NF;
  localparam int CW  = $clog2(ND + 1);

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_FINAL} state_t;

  state_t                 state;
  logic [CW-1:0]          cnt;
  sd_digit_t              r0_q;
  sd_digit_t [NF-1:0]     rf_q;
  logic [W-1:0]           d1_q, d3_q, d5_q, d7_q;
  logic [3:0]             kidx_q;

  // ---------------- prescaling ----------------
  logic [M+4:0]           ys;
  logic [3:0]             kidx_c;
  sd_digit_t              rinit_int;
  sd_digit_t [NF-1:0]     rinit_frac;
  logic [W-1:0]           d_bits;

  prescaler #(.M(M), .NF(NF)) u_pre (
    .x     (x),
    .y     (y),
    .r_int (rinit_int),
    .r_frac(rinit_frac),
    .ys    (ys),
    .k_idx (kidx_c)
  );

  // D = K*Y - 1 (K*Y < 15/14, so bit M+4 is the integer one)
  assign d_bits  = {ys[M+3:0], {(W - (M + 4)){1'b0}}};

  // ---------------- iteration ----------------
  sd_digit_t              q;
  sd_digit_t              r0_n;
  sd_digit_t [NF-1:0]     rf_n;
  logic                   c1, c2;

  nst_iteration #(.NF(NF)) u_iter (
    .r0     (r0_q),
    .rf     (rf_q),
    .d1     (d1_q),
    .d3     (d3_q),
    .d5     (d5_q),
    .d7     (d7_q),
    .q      (q),
    .r0_next(r0_n),
    .rf_next(rf_n),
    .case1  (c1),
    .case2  (c2)
  );

  logic [3*ND-1:0] qp, qm;

  otf_converter #(.ND(ND)) u_otf (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(start && state == S_IDLE),
    .en   (state == S_ITER),
    .q    (q),
    .qp   (qp),
    .qm   (qm)
  );

  // ---------------- registers and control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cnt    <= '0;
      r0_q   <= '0;
      rf_q   <= '0;
      d1_q   <= '0;
      d3_q   <= '0;
      d5_q   <= '0;
      d7_q   <= '0;
      kidx_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state  <= S_ITER;
          cnt    <= '0;
          r0_q   <= rinit_int;
          rf_q   <= rinit_frac;
          d1_q   <= d_bits;
          d3_q   <= d_bits + (d_bits << 1);
          d5_q   <= d_bits + (d_bits << 2);
          d7_q   <= (d_bits << 3) - d_bits;
          kidx_q <= kidx_c;
        end
        S_ITER: begin
          r0_q <= r0_n;
          rf_q <= rf_n;
          cnt  <= cnt + 1'b1;
          if (cnt == CW'(ND - 1)) state <= S_FINAL;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // convergence: with 1 <= K*Y < 15/14 the integer digit never leaves -1..1
  a_int_digit: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_ITER) |-> (r0_q >= -4'sd1 && r0_q <= 4'sd1));

  // ---------------- final remainder sign ----------------
  logic [W+3:0] pos_v, neg_v, rem_v;

  always_comb begin
    pos_v = '0;
    neg_v = '0;
    for (int i = 0; i < NF; i++) begin
      if (rf_q[i][3]) neg_v[3*i +: 3] = 3'(-rf_q[i]);
      else            pos_v[3*i +: 3] = rf_q[i][2:0];
    end
    if (r0_q[3])             neg_v[W] = 1'b1;
    else if (r0_q != 4'sd0)  pos_v[W] = 1'b1;
    rem_v = pos_v - neg_v;
  end

  assign busy      = (state != S_IDLE);
  assign res_valid = (state == S_FINAL);
  assign rem_neg   = rem_v[W+3];
  assign sticky    = (rem_v != '0);
  assign quo       = rem_neg ? qm : qp;
  assign k_idx     = kidx_q;
  assign rec_case1 = (state == S_ITER) && c1;
  assign rec_case2 = (state == S_ITER) && c2;

endmodule
