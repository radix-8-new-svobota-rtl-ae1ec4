// tb_fp_ref_pkg: reference model for the divider testbenches. It computes an
// IEEE 754 quotient with the same special-value, flush-to-zero and
// round-to-nearest-even conventions as the design, but by plain long integer
// division of the significands (no signed digits, no prescaling).
package tb_fp_ref_pkg;

  typedef struct packed {
    logic invalid;
    logic div_by_zero;
    logic overflow;
    logic underflow;
    logic inexact;
  } ref_flags_t;

  // Formats up to 11/52 are held right-aligned in 64 bits.
  function automatic void ref_div(input int ew, input int fw,
                                  input logic [63:0] a, input logic [63:0] b,
                                  output logic [63:0] res, output ref_flags_t fl);
    logic          sa, sb, s;
    longint        ea, eb, e, emax, bias;
    logic [63:0]   fa, fb, fmask;
    logic [127:0]  num, qq, rr, ma, mb;
    logic [63:0]   sig;
    logic          g, st, a_nan, b_nan, a_inf, b_inf, a_z, b_z;
    emax  = (longint'(1) << ew) - 1;
    bias  = (longint'(1) << (ew - 1)) - 1;
    fmask = (64'd1 << fw) - 1;
    sa = a[ew+fw]; sb = b[ew+fw]; s = sa ^ sb;
    ea = longint'((a >> fw) & emax); eb = longint'((b >> fw) & emax);
    fa = a & fmask; fb = b & fmask;
    a_nan = (ea == emax) && (fa != 0); b_nan = (eb == emax) && (fb != 0);
    a_inf = (ea == emax) && (fa == 0); b_inf = (eb == emax) && (fb == 0);
    a_z = (ea == 0); b_z = (eb == 0);
    fl = '0;
    res = (64'(emax) << fw) | (64'd1 << (fw - 1));   // quiet NaN
    if (a_nan || b_nan) begin
      fl.invalid = (a_nan && !fa[fw-1]) || (b_nan && !fb[fw-1]);
      return;
    end
    if ((a_z && b_z) || (a_inf && b_inf)) begin fl.invalid = 1; return; end
    if (a_inf || b_z) begin
      res = (64'(s) << (ew + fw)) | (64'(emax) << fw);
      fl.div_by_zero = b_z;
      return;
    end
    if (a_z || b_inf) begin res = 64'(s) << (ew + fw); return; end
    ma  = 128'((64'd1 << fw) | fa);
    mb  = 128'((64'd1 << fw) | fb);
    num = ma << (fw + 3);
    qq  = num / mb;
    rr  = num % mb;
    e   = ea - eb + bias;
    if (qq >= (128'd1 << (fw + 3))) begin
      sig = 64'(qq >> 3); g = qq[2]; st = (qq[1:0] != 0) || (rr != 0);
    end else begin
      e = e - 1;
      sig = 64'(qq >> 2); g = qq[1]; st = qq[0] || (rr != 0);
    end
    if (g && (st || sig[0])) sig = sig + 1;
    if (sig >> (fw + 1) != 0) begin sig = sig >> 1; e = e + 1; end
    fl.inexact = g || st;
    if (e >= emax) begin
      res = (64'(s) << (ew + fw)) | (64'(emax) << fw);
      fl.overflow = 1; fl.inexact = 1;
    end else if (e <= 0) begin
      res = 64'(s) << (ew + fw);
      fl.underflow = 1; fl.inexact = 1;
    end else begin
      res = (64'(s) << (ew + fw)) | (64'(e) << fw) | (sig & fmask);
    end
  endfunction

endpackage
