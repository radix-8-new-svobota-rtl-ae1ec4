// nst_pkg: types, constants and small functions shared by the radix-8 NST
// (New Svoboda-Tung) MROR divider.
//
// A remainder or quotient digit is a radix-8 signed digit from the maximally
// redundant set {-7..7}. It is carried in 4 bits using the coding of the
// divider's digit table: non-negative digits are plain binary, negative digits
// are the 4-bit two's complement (-7 = 1001 ... -1 = 1111). 1000 is never used.
//
// sd_split() is the carry-free rule of the signed-digit adder: a position sum
// in [-14,14] is split into a transfer digit (carry) c in {-1,0,1} and an
// interim sum t in [-6,6] with sum = 8*c + t. A carry is produced only when the
// interim sum would otherwise leave [-6,6]. The interim/final-sum behaviour
// follows the original design; this threshold is this design's own choice,
// as the original gate-level transfer equations are not reproduced.
package nst_pkg;

  localparam int RADIX = 8;   // b
  localparam int ALPHA = 7;   // largest digit magnitude (maximally redundant)
  localparam int BETA  = 3;   // MROR recoding bound, b/2 - 1

  typedef logic signed [3:0] sd_digit_t;   // one signed digit, -7..7
  typedef logic signed [1:0] sd_carry_t;   // transfer digit, -1..1

  typedef struct packed {
    sd_carry_t c;   // transfer to the next more significant position
    sd_digit_t t;   // interim sum, -6..6
  } sd_split_t;

  // IEEE 754 exception flags of one division.
  typedef struct packed {
    logic invalid;
    logic div_by_zero;
    logic overflow;
    logic underflow;
    logic inexact;
  } fp_flags_t;

  // Split a position sum (-14..14) into transfer digit and interim sum.
  function automatic sd_split_t sd_split(input logic signed [5:0] sum);
    sd_split_t r;
    if (sum >= 6'sd7) begin
      r.c = 2'sd1;
      r.t = 4'(sum - 6'(RADIX));
    end else if (sum <= -6'sd7) begin
      r.c = -2'sd1;
      r.t = 4'(sum + 6'(RADIX));
    end else begin
      r.c = 2'sd0;
      r.t = 4'(sum);
    end
    return r;
  endfunction

endpackage
