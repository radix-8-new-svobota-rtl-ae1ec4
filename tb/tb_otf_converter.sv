// tb_otf_converter: random digit sequences (-7..7) are fed to the on-the-fly
// converter; after each digit Q must equal the accumulated value
// sum q_i * 8^(k-i) and QM must equal Q - 1, both modulo 8^ND.
module tb_otf_converter;
  import nst_pkg::*;

  localparam int ND = 9;
  localparam int W  = 3 * ND;

  logic            clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0;
  sd_digit_t       q = '0;
  logic [W-1:0]    qp, qm;
  int              checks = 0, failures = 0;

  otf_converter #(.ND(ND)) dut (.clk, .rst_n, .clear, .en, .q, .qp, .qm);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 3000; t++) begin
      clear <= 1'b1;
      @(posedge clk);
      clear <= 1'b0;
      acc = 0;
      for (int k = 0; k < ND; k++) begin
        q  <= 4'($signed($urandom_range(0, 14)) - 7);
        en <= 1'b1;
        @(posedge clk);
        en <= 1'b0;
        acc = acc * 8 + longint'(q);
        @(negedge clk);
        checks++;
        if (qp != W'(acc) || qm != W'(acc - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d k=%0d: Q=%h QM=%h expected %h", t, k, qp, qm, W'(acc));
        end
      end
      // en low holds the value
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (qp != W'(acc)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
