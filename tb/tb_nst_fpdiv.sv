// tb_nst_fpdiv: self-checking test of the single-precision nst_fpdiv.
// Random and directed operands (normal values over the whole exponent range,
// significands at the ends of every prescale interval, zeros, subnormals,
// infinities, NaNs) are divided and result and flags are compared with the
// integer reference model. Every division must take exactly 11 cycles:
// done must appear 10 edges after the edge that samples start.
module tb_nst_fpdiv;
  import nst_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int NOPS    = 200000;
  localparam int LATENCY = 11;   // clock cycles, start cycle included

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [31:0] a = '0, b = '0;
  logic        busy, done;
  logic [31:0] result;
  fp_flags_t   flags;
  int          checks = 0, failures = 0;

  nst_fpdiv #(.EXP_W(8), .FRAC_W(23)) dut (
    .clk, .rst_n, .start, .a, .b, .busy, .done, .result, .flags
  );

  always #5 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rand_operand(int kind);
    logic [31:0] v;
    v = $urandom;
    unique case (kind)
      0:  v[30:23] = 8'(127 + $signed($urandom_range(0, 40)) - 20);   // near one
      1:  ;                                                           // any pattern
      2:  v[30:23] = 8'd0;                                            // zero / subnormal
      3:  v[30:23] = 8'hFF;                                           // inf / NaN
      4:  begin v[30:23] = 8'(127 + $signed($urandom_range(0, 40)) - 20);
                v[22:18] = 5'($urandom_range(0, 31));                 // interval edges
                v[17:0] = ($urandom_range(0, 1) == 1) ? '1 : '0; end
      default: v[30:23] = 8'(127 + $signed($urandom_range(0, 40)) - 20);
    endcase
    if (kind == 3 && $urandom_range(0, 1) == 1) v[22:0] = '0;
    return v;
  endfunction

  task automatic run_one(input logic [31:0] ta, input logic [31:0] tb);
    logic [63:0] exp_res;
    ref_flags_t  exp_fl;
    int          cyc;
    ref_div(8, 23, {32'd0, ta}, {32'd0, tb}, exp_res, exp_fl);
    a <= ta; b <= tb; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!done && cyc < 100);
    checks++;
    if (result != exp_res[31:0] || flags != fp_flags_t'(exp_fl)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h / %h : got %h flags %b, expected %h flags %b",
                 ta, tb, result, flags, exp_res[31:0], exp_fl);
    end
    checks++;
    if (cyc != LATENCY) begin
      failures++;
      if (failures < 10) $display("FAIL latency %0d edges, expected %0d", cyc, LATENCY);
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run_one(32'h3f800000, 32'h3f800000);   // 1/1
    run_one(32'h40400000, 32'h3f800000);   // 3/1
    run_one(32'h3f800000, 32'h40400000);   // 1/3
    run_one(32'h3fffffff, 32'h3f800001);
    run_one(32'h3f800000, 32'h3fffffff);
    run_one(32'h7f7fffff, 32'h00800000);   // overflow
    run_one(32'h00800000, 32'h7f7fffff);   // underflow
    for (int i = 0; i < NOPS; i++) begin
      int ka, kb;
      ka = ($urandom_range(0, 19) == 0) ? int'($urandom_range(1, 3)) : (($urandom_range(0, 3) == 0) ? 4 : 0);
      kb = ($urandom_range(0, 19) == 0) ? int'($urandom_range(1, 3)) : (($urandom_range(0, 3) == 0) ? 4 : 0);
      run_one(rand_operand(ka), rand_operand(kb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
