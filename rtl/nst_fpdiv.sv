// nst_fpdiv: IEEE 754 binary floating-point divider around the radix-8 NST
// MROR significand core. EXP_W/FRAC_W select the format (8/23 single,
// 11/52 double).
//
// Cycle 0 (start high, busy low): operands are unpacked, the exponent
// difference and the special-value result are registered, and the core
// starts. The core runs its ND iterations; in the cycle its result is valid
// the quotient X/Y = 2*Qc is normalized (one left shift when Qc < 1/2),
// rounded to nearest-even with a guard bit and the sticky bit, and the packed
// result and flags are registered. done pulses for one cycle after that:
// a division occupies ND + 2 cycles (11 for single, 21 for double), start is
// sampled at edge k and done/result are visible after edge k + ND + 1.
//
// Special values: NaN in -> quiet NaN (0x7FC00000 pattern); 0/0 and inf/inf
// are invalid; x/0 with x finite non-zero gives inf and div_by_zero. The
// original design states IEEE 754 compliance but gives none of these details; this
// design flushes subnormal inputs to zero and subnormal results to zero
// (underflow and inexact raised), rounds to nearest-even only, and returns
// inf on overflow.
module nst_fpdiv
  import nst_pkg::*;
#(
  parameter int EXP_W  = 8,
  parameter int FRAC_W = 23
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [EXP_W+FRAC_W:0]    a,        // dividend
  input  logic [EXP_W+FRAC_W:0]    b,        // divisor
  output logic                     busy,
  output logic                     done,
  output logic [EXP_W+FRAC_W:0]    result,
  output fp_flags_t                flags
);

  localparam int M    = FRAC_W + 1;
  localparam int ND   = (M + 5) / 3;
  localparam int QW   = 3 * ND;
  localparam int BIAS = (1 << (EXP_W - 1)) - 1;
  localparam int EW   = EXP_W + 3;                 // signed exponent arithmetic
  localparam logic [EXP_W-1:0] EMAX = '1;

  // ---------------- unpack ----------------
  logic              sa, sb;
  logic [EXP_W-1:0]  ea, eb;
  logic [FRAC_W-1:0] fa, fb;
  logic              a_zero, b_zero, a_inf, b_inf, a_nan, b_nan, a_snan, b_snan;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    a_zero = (ea == '0);
    b_zero = (eb == '0);
    a_inf  = (ea == EMAX) && (fa == '0);
    b_inf  = (eb == EMAX) && (fb == '0);
    a_nan  = (ea == EMAX) && (fa != '0);
    b_nan  = (eb == EMAX) && (fb != '0);
    a_snan = a_nan && !fa[FRAC_W-1];
    b_snan = b_nan && !fb[FRAC_W-1];
  end

  // special-value result decided at start
  logic                    sp_c;
  logic [EXP_W+FRAC_W:0]   sp_res_c;
  fp_flags_t               sp_flags_c;
  logic                    sign_c;

  always_comb begin
    sign_c     = sa ^ sb;
    sp_c       = 1'b1;
    sp_flags_c = '0;
    sp_res_c   = {1'b0, EMAX, 1'b1, {(FRAC_W-1){1'b0}}};     // quiet NaN
    if (a_nan || b_nan) begin
      sp_flags_c.invalid = a_snan || b_snan;
    end else if ((a_zero && b_zero) || (a_inf && b_inf)) begin
      sp_flags_c.invalid = 1'b1;
    end else if (a_inf || b_zero) begin
      sp_res_c = {sign_c, EMAX, {FRAC_W{1'b0}}};
      sp_flags_c.div_by_zero = b_zero;
    end else if (a_zero || b_inf) begin
      sp_res_c = {sign_c, {(EXP_W+FRAC_W){1'b0}}};
    end else begin
      sp_c = 1'b0;
    end
  end

  // ---------------- registers of cycle 0 ----------------
  logic                   sp_q, sign_q;
  logic [EXP_W+FRAC_W:0]  sp_res_q;
  fp_flags_t              sp_flags_q;
  logic signed [EW-1:0]   exp_q;
  logic                   accept;

  assign accept = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp_q       <= 1'b0;
      sign_q     <= 1'b0;
      sp_res_q   <= '0;
      sp_flags_q <= '0;
      exp_q      <= '0;
    end else if (accept) begin
      sp_q       <= sp_c;
      sign_q     <= sign_c;
      sp_res_q   <= sp_res_c;
      sp_flags_q <= sp_flags_c;
      exp_q      <= EW'(ea) - EW'(eb) + EW'(BIAS);
    end
  end

  // ---------------- significand core ----------------
  logic             core_busy, core_valid, sticky, rem_neg, rc1, rc2;
  logic [QW-1:0]    quo;
  logic [3:0]       k_idx;

  nst_divider_core #(.M(M)) u_core (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (accept),
    .x        ({1'b1, fa}),
    .y        ({1'b1, fb}),
    .busy     (core_busy),
    .res_valid(core_valid),
    .quo      (quo),
    .sticky   (sticky),
    .k_idx    (k_idx),
    .rec_case1(rc1),
    .rec_case2(rc2),
    .rem_neg  (rem_neg)
  );

  // ---------------- normalize and round ----------------
  logic [M-1:0]            sig;
  logic                    guard, rest, round_up;
  logic [M:0]              sig_r;
  logic signed [EW-1:0]    exp_n;
  logic [EXP_W+FRAC_W:0]   res_c;
  fp_flags_t               flags_c;

  always_comb begin
    if (quo[QW-1]) begin
      sig   = quo[QW-1 -: M];
      guard = quo[QW-1-M];
      rest  = |quo[QW-2-M:0] | sticky;
      exp_n = exp_q;
    end else begin
      sig   = quo[QW-2 -: M];
      guard = quo[QW-2-M];
      rest  = |quo[QW-3-M:0] | sticky;
      exp_n = exp_q - EW'(1);
    end
    round_up = guard && (rest || sig[0]);
    sig_r    = {1'b0, sig} + (M+1)'(round_up);
    if (sig_r[M]) begin
      sig_r = sig_r >> 1;
      exp_n = exp_n + EW'(1);
    end
    flags_c         = '0;
    flags_c.inexact = guard || rest;
    if (exp_n >= $signed(EW'(EMAX))) begin
      res_c            = {sign_q, EMAX, {FRAC_W{1'b0}}};
      flags_c.overflow = 1'b1;
      flags_c.inexact  = 1'b1;
    end else if (exp_n <= $signed(EW'(0))) begin
      res_c             = {sign_q, {(EXP_W+FRAC_W){1'b0}}};
      flags_c.underflow = 1'b1;
      flags_c.inexact   = 1'b1;
    end else begin
      res_c = {sign_q, exp_n[EXP_W-1:0], sig_r[FRAC_W-1:0]};
    end
    if (sp_q) begin
      res_c   = sp_res_q;
      flags_c = sp_flags_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result <= '0;
      flags  <= '0;
      done   <= 1'b0;
    end else begin
      done <= core_valid;
      if (core_valid) begin
        result <= res_c;
        flags  <= flags_c;
      end
    end
  end

  assign busy = core_busy;

  // done is a single-cycle pulse, and the unit is idle while it is high
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy ##1 !done);

endmodule
