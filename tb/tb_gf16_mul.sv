// tb_gf16_mul -- exhaustive check of the GF(2^4) multiplier.
// All 256 operand pairs are compared with a product built from the table of
// basis-vector products (tb_ref_pkg). Also checks that 4'hF is the unit and
// that every nonzero element has an inverse (a field, not just a ring).
module tb_gf16_mul;
  import gf_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  gf16_t a, b, p;

  gf16_mul dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int units = 0;
  bit has_inv [16];

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        @(posedge clk);
        checks++;
        if (p !== ref_mul16(a, b)) begin
          failures++;
          $display("FAIL %h * %h = %h, expected %h", a, b, p, ref_mul16(a, b));
        end
        if (p == ONE16) has_inv[i] = 1;
        if (j == 15 && i != 0) begin
          checks++;
          if (!has_inv[i]) begin
            failures++;
            $display("FAIL %h has no inverse", a);
          end
        end
        if (b == ONE16 && p == a) units++;
      end
    end
    checks++;
    if (units != 16) begin
      failures++;
      $display("FAIL 4'hF is not the unit element");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
