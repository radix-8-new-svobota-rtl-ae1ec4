// recode_unit: quotient digit selection of the radix-8 NST MROR recurrence.
//
// The NST quotient digit is simply the leading digit of the shifted remainder
// 8*R, after the two leading digits have been recoded so that a second digit of
// opposite sign is never larger than BETA = 3 in magnitude:
//   case 1: leading digit > 0 and second digit < -3  ->  lead-1, second+8
//   case 2: leading digit < 0 and second digit > +3  ->  lead+1, second-8
// The remainder here keeps an integer digit r0 (-1..1), the transfer out of
// the carry-free adder of the previous step, so the leading value is
// v = 8*r0 + r1 and can reach +-8. When recoding leaves |q| = 8 the unit moves
// one more unit into the second digit (q = +-7, u = second +- 8); this
// saturation step, and u being allowed to reach +-8, are this design's own
// extension. Outputs: q, the quotient digit (-7..7), and u, the recoded second
// digit (-8..8) that becomes the first fraction digit of the next remainder.
// 64*r0 + 8*r1 + r2 = 8*q + u always holds. Purely combinational.
module recode_unit
  import nst_pkg::*;
(
  input  sd_digit_t          r0,     // integer digit of R(j), -1..1
  input  sd_digit_t          r1,     // first fraction digit of R(j)
  input  sd_digit_t          r2,     // second fraction digit of R(j)
  output sd_digit_t          q,      // quotient digit q(j+1)
  output logic signed [4:0]  u,      // recoded second digit
  output logic               case1,  // positive leading digit recoded
  output logic               case2   // negative leading digit recoded
);

  logic signed [6:0] v, qv, uv;

  always_comb begin
    v     = 7'(r0) * 7'sd8 + 7'(r1);
    qv    = v;
    uv    = 7'(r2);
    case1 = 1'b0;
    case2 = 1'b0;
    if (v > 7'sd0 && uv < -7'(BETA)) begin
      qv    = v - 7'sd1;
      uv    = uv + 7'sd8;
      case1 = 1'b1;
    end else if (v < 7'sd0 && uv > 7'(BETA)) begin
      qv    = v + 7'sd1;
      uv    = uv - 7'sd8;
      case2 = 1'b1;
    end
    if (qv > 7'(ALPHA)) begin
      qv = qv - 7'sd1;
      uv = uv + 7'sd8;
    end else if (qv < -7'(ALPHA)) begin
      qv = qv + 7'sd1;
      uv = uv - 7'sd8;
    end
    q = 4'(qv);
    u = 5'(uv);
  end

endmodule
