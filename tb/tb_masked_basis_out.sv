// tb_masked_basis_out -- check of the output basis change: for every byte v,
// with x_t = iso(v) the tower image of v (tb_ref_pkg),
//   encrypt: y = L v ^ 63 (AES affine transform)     decrypt: y = v.
module tb_masked_basis_out;
  import gf_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  gf256_t x_t, y;
  logic encrypt;
  logic [7:0] v, e_y;

  masked_basis_out dut (.x_t(x_t), .encrypt(encrypt), .y(y));

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int i = 0; i < 256; i++) begin
        encrypt = e[0];
        v   = 8'(i);
        x_t = to_tower(v);
        @(posedge clk);
        e_y = encrypt ? (aes_lin(v) ^ 8'h63) : v;
        checks++;
        if (y !== e_y) begin
          failures++;
          if (failures < 10)
            $display("FAIL enc=%0b v=%h: y=%h expected %h", encrypt, v, y, e_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
