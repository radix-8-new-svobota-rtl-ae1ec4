// nst_r8_divider: the two radix-8 NST MROR floating-point dividers, IEEE 754
// single precision (11 cycles per division) and double precision (21 cycles),
// side by side with independent ports. Each is an nst_fpdiv: prescaler,
// carry-free signed-digit iteration, registers, on-the-fly quotient
// conversion and rounding. A start pulse while the unit's busy is low begins a
// division; done pulses with the result and the IEEE flags. One clock and one
// asynchronous active-low reset serve both.
// The two formats and their cycle counts follow the original design; keeping
// them as two independent units with their own handshakes is this design's
// choice.
module nst_r8_divider
  import nst_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // single precision
  input  logic        sp_start,
  input  logic [31:0] sp_a,
  input  logic [31:0] sp_b,
  output logic        sp_busy,
  output logic        sp_done,
  output logic [31:0] sp_result,
  output fp_flags_t   sp_flags,
  // double precision
  input  logic        dp_start,
  input  logic [63:0] dp_a,
  input  logic [63:0] dp_b,
  output logic        dp_busy,
  output logic        dp_done,
  output logic [63:0] dp_result,
  output fp_flags_t   dp_flags
);

  nst_fpdiv #(.EXP_W(8), .FRAC_W(23)) u_sp (
    .clk   (clk),
    .rst_n (rst_n),
    .start (sp_start),
    .a     (sp_a),
    .b     (sp_b),
    .busy  (sp_busy),
    .done  (sp_done),
    .result(sp_result),
    .flags (sp_flags)
  );

  nst_fpdiv #(.EXP_W(11), .FRAC_W(52)) u_dp (
    .clk   (clk),
    .rst_n (rst_n),
    .start (dp_start),
    .a     (dp_a),
    .b     (dp_b),
    .busy  (dp_busy),
    .done  (dp_done),
    .result(dp_result),
    .flags (dp_flags)
  );

endmodule
