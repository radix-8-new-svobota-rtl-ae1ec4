// sd_adder: carry-free radix-8 signed-digit adder over N digit positions.
//
// Each position is an sd_adder_digit; the transfer digit of position i feeds
// only position i+1, and because no transfer depends on an incoming transfer
// the delay is that of one digit position whatever N is. Digit index 0 is the
// least significant. cin enters position 0, cout leaves position N-1; the
// value relation is  sum(a) + sum(b) + cin = sum(s) + cout*8^N.
// Purely combinational.
module sd_adder
  import nst_pkg::*;
#(
  parameter int N = 10   // digit positions (remainder fraction width of the single-precision divider)
) (
  input  sd_digit_t [N-1:0] a,
  input  sd_digit_t [N-1:0] b,
  input  sd_carry_t         cin,
  output sd_digit_t [N-1:0] s,
  output sd_carry_t         cout
);

  sd_carry_t [N:0] c;

  assign c[0] = cin;
  assign cout = c[N];

  for (genvar i = 0; i < N; i++) begin : g_pos
    sd_adder_digit u_digit (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .cout(c[i+1]),
      .s   (s[i])
    );
  end

endmodule
