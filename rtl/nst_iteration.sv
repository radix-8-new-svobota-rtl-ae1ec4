// nst_iteration: one step of the radix-8 NST recurrence R(j+1) = 8*R(j) - q*Y,
// carried out entirely in signed-digit form without carry propagation.
//
// The remainder is an integer digit r0 (-1..1) and NF fraction digits rf
// (rf[NF-1] is the first fraction digit). The step:
//   1. recode unit: q and the recoded second digit u from r0, rf[NF-1], rf[NF-2];
//   2. shifter: 8*R is a one-digit left shift, so the integer part of 8*R is
//      consumed by q and u becomes the first fraction digit, followed by
//      rf[NF-3..0] and a zero;
//   3. compensation unit: the digits of -q*(Y-1);
//   4. signed-digit adder: the two digit words are added; the transfer out of
//      the first fraction position becomes the new integer digit.
// The first position takes u in -8..8, so it is formed here with the same
// split rule as the adder digits (its sum stays within -11..8: the first digit of q*(Y-1) < 1/2 is at most 3).
// With Y in [1, 1+1/14) the remainder stays inside (-1, 1).
// Purely combinational; needs NF >= 3.
module nst_iteration
  import nst_pkg::*;
#(
  parameter int NF = 10   // remainder fraction digits (single precision)
) (
  input  sd_digit_t          r0,
  input  sd_digit_t [NF-1:0] rf,
  input  logic [3*NF-1:0]    d1,      // Y-1 and its odd multiples
  input  logic [3*NF-1:0]    d3,
  input  logic [3*NF-1:0]    d5,
  input  logic [3*NF-1:0]    d7,
  output sd_digit_t          q,       // quotient digit of this step
  output sd_digit_t          r0_next,
  output sd_digit_t [NF-1:0] rf_next,
  output logic               case1,
  output logic               case2
);

  logic signed [4:0]    u;
  sd_digit_t [NF-1:0]   m;
  sd_digit_t [NF-2:0]   a_low;
  sd_digit_t [NF-2:0]   s_low;
  sd_carry_t            c_low;
  sd_split_t            top;

  recode_unit u_recode (
    .r0   (r0),
    .r1   (rf[NF-1]),
    .r2   (rf[NF-2]),
    .q    (q),
    .u    (u),
    .case1(case1),
    .case2(case2)
  );

  compensation_unit #(.NF(NF)) u_comp (
    .q (q),
    .d1(d1),
    .d3(d3),
    .d5(d5),
    .d7(d7),
    .m (m)
  );

  // shifter: fraction positions NF-2..1 take rf[NF-3..0], the last a zero
  assign a_low = {rf[NF-3:0], sd_digit_t'(0)};

  sd_adder #(.N(NF-1)) u_add (
    .a   (a_low),
    .b   (m[NF-2:0]),
    .cin (2'sd0),
    .s   (s_low),
    .cout(c_low)
  );

  always_comb begin
    top             = sd_split(6'(u) + 6'(m[NF-1]));
    r0_next         = sd_digit_t'(top.c);
    rf_next[NF-1]   = top.t + 4'(c_low);
    rf_next[NF-2:0] = s_low;
  end

endmodule
