// prescaler: scales dividend X and divisor Y (IEEE significands, 1 <= X,Y < 2)
// by a factor K so that the divisor falls into the radix-8 MROR convergence
// range 1 <= K*Y < 1 + 1/14.
//
// The leading fraction bits of Y pick one of 16 divisor intervals; interval i
// has the factor K = 1 - i/32. K is never multiplied: it is written as 1/2
// plus at most three further terms 2^-k, one of which (1/32) may be
// subtracted, so each product is the sum of multiplexer-selected shifted
// copies of the operand:
//   i : K      terms                i : K      terms
//   0 : 32/32  1/2+1/2              8 : 24/32  1/2+1/4
//   1 : 31/32  1/2+1/2-1/32         9 : 23/32  1/2+1/4-1/32
//   2 : 30/32  1/2+1/4+1/8+1/16    10 : 22/32  1/2+1/8+1/16
//   3 : 29/32  1/2+1/4+1/8+1/32    11 : 21/32  1/2+1/8+1/32
//   4 : 28/32  1/2+1/4+1/8         12 : 20/32  1/2+1/8
//   5 : 27/32  1/2+1/4+1/8-1/32    13 : 19/32  1/2+1/16+1/32
//   6 : 26/32  1/2+1/4+1/16        14 : 18/32  1/2+1/16
//   7 : 25/32  1/2+1/4+1/32        15 : 17/32  1/2+1/32
// Interval i covers 1+d(i-1) <= Y < 1+d(i), with transition points (in 1/32)
//   d = 2, 3, 4, 5, 6, 8, 9, 11, 13, 15, 17, 20, 22, 25, 28.5, 32.
// Factors, term decomposition and all but two transition points are those of
// the divider's prescaling table. Two points are moved so that K*Y never
// drops below 1: d11 = 20/32 (with 19/32, Y = 51/32 would give
// K*Y = 1020/1024) and d14 = 57/64 (with 28/32, Y = 60/32 would give
// K*Y = 1020/1024). The second needs a sixth divisor bit, Y(n-6), for the
// 28/32..29/32 slice only.
//
// Dividend path (carry free): the selected shifted copies of X/2 are read as
// radix-8 digit words (binary octal digits 0..7 are legal signed digits) and
// summed by three levels of carry-free signed-digit adders,
//   (1/2 + A) + (B + C)  then  +- 1/32,
// the subtraction being a digit-wise negation. The delay is that of three
// digit positions whatever the operand width, and the result is already the
// signed-digit initial remainder R(0) = K*X/2: an integer digit (0 or 1, the
// sum of the adders' transfers) and NF fraction digits.
// Divisor path: the divisor is kept in conventional binary digits, so K*Y is
// summed with an ordinary binary adder; it is exact, one integer bit and M+4
// fraction bits.
// Purely combinational.
module prescaler
  import nst_pkg::*;
#(
  parameter int M  = 24,             // significand bits including the hidden one (single precision), >= 7
  parameter int NF = (M + 7) / 3     // fraction digits of R(0), 3*NF >= M+5
) (
  input  logic [M-1:0]        x,      // dividend 1.f, M-1 fraction bits
  input  logic [M-1:0]        y,      // divisor 1.f
  output sd_digit_t           r_int,  // integer digit of K*X/2 (0 or 1)
  output sd_digit_t [NF-1:0]  r_frac, // fraction digits of K*X/2, index 0 least significant
  output logic [M+4:0]        ys,     // K*Y, in [1, 15/14)
  output logic [3:0]          k_idx   // interval index i, K = 1 - i/32
);

  localparam int W = 3 * NF;

  // term selection: a = 0 none / 1 half / 2 quarter; e = 0 none / 1 add / 2 sub
  logic [1:0] sel_a, sel_e;
  logic       sel_b, sel_c;

  always_comb begin
    unique case (y[M-2 -: 5])
      5'd0, 5'd1:                 k_idx = 4'd0;
      5'd2:                       k_idx = 4'd1;
      5'd3:                       k_idx = 4'd2;
      5'd4:                       k_idx = 4'd3;
      5'd5:                       k_idx = 4'd4;
      5'd6, 5'd7:                 k_idx = 4'd5;
      5'd8:                       k_idx = 4'd6;
      5'd9, 5'd10:                k_idx = 4'd7;
      5'd11, 5'd12:               k_idx = 4'd8;
      5'd13, 5'd14:               k_idx = 4'd9;
      5'd15, 5'd16:               k_idx = 4'd10;
      5'd17, 5'd18, 5'd19:        k_idx = 4'd11;
      5'd20, 5'd21:               k_idx = 4'd12;
      5'd22, 5'd23, 5'd24:        k_idx = 4'd13;
      5'd25, 5'd26, 5'd27:        k_idx = 4'd14;
      5'd28:                      k_idx = y[M-7] ? 4'd15 : 4'd14;
      default:                    k_idx = 4'd15;
    endcase

    sel_a = 2'd0; sel_b = 1'b0; sel_c = 1'b0; sel_e = 2'd0;
    unique case (k_idx)
      4'd0:  begin sel_a = 2'd1;                                     end
      4'd1:  begin sel_a = 2'd1;                           sel_e = 2'd2; end
      4'd2:  begin sel_a = 2'd2; sel_b = 1'b1; sel_c = 1'b1;             end
      4'd3:  begin sel_a = 2'd2; sel_b = 1'b1;             sel_e = 2'd1; end
      4'd4:  begin sel_a = 2'd2; sel_b = 1'b1;                           end
      4'd5:  begin sel_a = 2'd2; sel_b = 1'b1;             sel_e = 2'd2; end
      4'd6:  begin sel_a = 2'd2;               sel_c = 1'b1;             end
      4'd7:  begin sel_a = 2'd2;                           sel_e = 2'd1; end
      4'd8:  begin sel_a = 2'd2;                                         end
      4'd9:  begin sel_a = 2'd2;                           sel_e = 2'd2; end
      4'd10: begin               sel_b = 1'b1; sel_c = 1'b1;             end
      4'd11: begin               sel_b = 1'b1;             sel_e = 2'd1; end
      4'd12: begin               sel_b = 1'b1;                           end
      4'd13: begin                             sel_c = 1'b1; sel_e = 2'd1; end
      4'd14: begin                             sel_c = 1'b1;             end
      default: begin                                       sel_e = 2'd1; end
    endcase
  end

  // ---------------- divisor: binary ----------------
  logic [M+4:0] yo;

  always_comb begin
    yo = {y, 5'b0};
    ys = yo >> 1;
    if (sel_a == 2'd1) ys = ys + (yo >> 1);
    if (sel_a == 2'd2) ys = ys + (yo >> 2);
    if (sel_b)         ys = ys + (yo >> 3);
    if (sel_c)         ys = ys + (yo >> 4);
    if (sel_e == 2'd1) ys = ys + (yo >> 5);
    if (sel_e == 2'd2) ys = ys - (yo >> 5);
  end

  // ---------------- dividend: carry-free signed digits ----------------
  logic [W-1:0]       xw;                       // X/2 as a W-bit fraction
  logic [W-1:0]       t_h, t_a, t_b, t_c, t_e;  // selected shifted copies
  sd_digit_t [NF-1:0] d_h, d_a, d_b, d_c, d_e, s_ha, s_bc, s_2, s_3;
  sd_carry_t          c_ha, c_bc, c_2, c_3;

  always_comb begin
    xw  = {x, {(W - M){1'b0}}};
    t_h = xw >> 1;
    t_a = (sel_a == 2'd1) ? (xw >> 1) : (sel_a == 2'd2) ? (xw >> 2) : '0;
    t_b = sel_b ? (xw >> 3) : '0;
    t_c = sel_c ? (xw >> 4) : '0;
    t_e = (sel_e != 2'd0) ? (xw >> 5) : '0;
    for (int i = 0; i < NF; i++) begin
      d_h[i] = sd_digit_t'({1'b0, t_h[3*i +: 3]});
      d_a[i] = sd_digit_t'({1'b0, t_a[3*i +: 3]});
      d_b[i] = sd_digit_t'({1'b0, t_b[3*i +: 3]});
      d_c[i] = sd_digit_t'({1'b0, t_c[3*i +: 3]});
      d_e[i] = (sel_e == 2'd2) ? -sd_digit_t'({1'b0, t_e[3*i +: 3]})
                               :  sd_digit_t'({1'b0, t_e[3*i +: 3]});
    end
  end

  sd_adder #(.N(NF)) u_add_ha (.a(d_h),  .b(d_a),  .cin(2'sd0), .s(s_ha), .cout(c_ha));
  sd_adder #(.N(NF)) u_add_bc (.a(d_b),  .b(d_c),  .cin(2'sd0), .s(s_bc), .cout(c_bc));
  sd_adder #(.N(NF)) u_add_2  (.a(s_ha), .b(s_bc), .cin(2'sd0), .s(s_2),  .cout(c_2));
  sd_adder #(.N(NF)) u_add_3  (.a(s_2),  .b(d_e),  .cin(2'sd0), .s(s_3),  .cout(c_3));

  // integer digit: the transfers out of the top position (K*X/2 < 1 keeps it 0 or 1)
  assign r_int  = sd_digit_t'(c_ha) + sd_digit_t'(c_bc) + sd_digit_t'(c_2) + sd_digit_t'(c_3);
  assign r_frac = s_3;

endmodule
