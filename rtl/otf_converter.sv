// otf_converter: on-the-fly conversion of the signed-digit quotient to binary.
//
// Two registers are kept, Q (the digits so far) and QM = Q - 1 unit of the
// last digit. For each new digit q (-7..7):
//   Q  <= q >= 0 ? {Q , q}   : {QM, q+8}
//   QM <= q >  0 ? {Q , q-1} : {QM, q+7}
// so no carry ever propagates. Both are ND octal digits wide; the result is
// exact modulo 8^ND. clear (synchronous) sets Q = 0, QM = -1. Q is needed when
// the final remainder is non-negative, QM when it is negative. The original
// design only calls for an on-the-fly converter; the two-register scheme is
// the standard method.
module otf_converter
  import nst_pkg::*;
#(
  parameter int ND = 9   // quotient digits (single precision)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              en,
  input  sd_digit_t         q,
  output logic [3*ND-1:0]   qp,     // Q
  output logic [3*ND-1:0]   qm      // Q - 1 ulp
);

  logic [2:0] dq, dqm;

  always_comb begin
    dq  = q[3] ? 3'(5'(q) + 5'sd8) : 3'(q);
    dqm = (q > 4'sd0) ? 3'(q - 4'sd1) : 3'(q + 4'sd7);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qp <= '0;
      qm <= '1;
    end else if (clear) begin
      qp <= '0;
      qm <= '1;
    end else if (en) begin
      qp <= q[3] ? {qm[3*ND-4:0], dq} : {qp[3*ND-4:0], dq};
      qm <= (q > 4'sd0) ? {qp[3*ND-4:0], dqm} : {qm[3*ND-4:0], dqm};
    end
  end

endmodule
