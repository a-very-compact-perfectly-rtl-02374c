// tb_gf16_sq_scl -- exhaustive check of the square-scale unit:
// y must equal N * x * x computed with the reference GF(2^4) product.
module tb_gf16_sq_scl;
  import gf_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  gf16_t x, y;

  gf16_sq_scl dut (.x(x), .y(y));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] expect_y;

  initial begin
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      @(posedge clk);
      expect_y = ref_mul16(NORM_N, ref_mul16(x, x));
      checks++;
      if (y !== expect_y) begin
        failures++;
        $display("FAIL sq_scl(%h) = %h, expected %h", x, y, expect_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
