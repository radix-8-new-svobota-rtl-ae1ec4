// compensation_unit: forms the subtrahend -q*(Y-1) of the NST recurrence as a
// word of radix-8 signed digits.
//
// Because the leading digit of 8*R equals q by construction, only the
// fractional part D = Y-1 of the prescaled divisor (0 <= D < 1/14) has to be
// multiplied. The multiples are picked by multiplexers from D, 3D, 5D and 7D,
// which are formed once per division and held in registers; 2D, 4D and 6D are
// shifts of them. The chosen |q|*D (< 1/2) is cut into octal digits, and each
// digit is negated when q > 0 (subtraction) or kept when q < 0 (addition). The
// original design says only that this unit is built from multiplexers; the
// precomputed odd multiples are this design's choice. Digit index 0 is the
// least significant; d* are fractions with W = 3*NF bits. Combinational.
module compensation_unit
  import nst_pkg::*;
#(
  parameter int NF = 10   // fraction digits (single-precision remainder width)
) (
  input  sd_digit_t             q,
  input  logic [3*NF-1:0]       d1,   // D
  input  logic [3*NF-1:0]       d3,   // 3D
  input  logic [3*NF-1:0]       d5,   // 5D
  input  logic [3*NF-1:0]       d7,   // 7D
  output sd_digit_t [NF-1:0]    m     // digits of -q*D
);

  logic [3*NF-1:0] mag;
  logic [2:0]      qa;

  always_comb begin
    qa = q[3] ? 3'(-q) : 3'(q);
    unique case (qa)
      3'd1:    mag = d1;
      3'd2:    mag = d1 << 1;
      3'd3:    mag = d3;
      3'd4:    mag = d1 << 2;
      3'd5:    mag = d5;
      3'd6:    mag = d3 << 1;
      3'd7:    mag = d7;
      default: mag = '0;
    endcase
    for (int i = 0; i < NF; i++) begin
      if (q[3]) m[i] = sd_digit_t'({1'b0, mag[3*i +: 3]});
      else      m[i] = -sd_digit_t'({1'b0, mag[3*i +: 3]});
    end
  end

endmodule
