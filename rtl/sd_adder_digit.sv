// sd_adder_digit: one position of the carry-free radix-8 MROR signed-digit
// adder.
//
// The two input digits a and b (each -7..7, 4-bit two's complement coding) are
// added and split into a transfer digit cout (-1..1) and an interim sum t
// (-6..6) with a + b = 8*cout + t. The final sum s = t + cin, where cin is the
// transfer digit of the next less significant position, always lands in -7..7,
// so cout never depends on cin: there is no carry chain. The final-sum stage
// is the function of the original design's final-sum truth table (t plus a transfer
// of +1, 0 or -1); the transfer threshold is chosen in nst_pkg::sd_split.
// Purely combinational.
module sd_adder_digit
  import nst_pkg::*;
(
  input  sd_digit_t a,
  input  sd_digit_t b,
  input  sd_carry_t cin,    // transfer from the less significant position
  output sd_carry_t cout,   // transfer to the more significant position
  output sd_digit_t s       // final sum digit, -7..7
);

  sd_split_t sp;

  always_comb begin
    sp   = sd_split(6'(a) + 6'(b));
    cout = sp.c;
    s    = sp.t + 4'(cin);
  end

endmodule
