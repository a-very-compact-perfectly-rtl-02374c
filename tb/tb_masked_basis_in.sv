// tb_masked_basis_in -- check of the input basis change.
// The reference isomorphism to_tower (tb_ref_pkg) is first checked to be a
// field isomorphism (it preserves products). Then, for all data bytes in both
// directions with random masks:
//   encrypt: am_t = iso(am), m_t = iso(m), s_t = iso(L^-1 s)
//   decrypt: am_t = iso(L^-1 (am ^ 63)), m_t = iso(L^-1 m), s_t = iso(s)
// where L is the linear part of the AES affine transform.
module tb_masked_basis_in;
  import gf_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  gf256_t am, m, s, am_t, m_t, s_t;
  logic encrypt;

  masked_basis_in dut (.am(am), .m(m), .s(s), .encrypt(encrypt),
                       .am_t(am_t), .m_t(m_t), .s_t(s_t));

  logic [7:0] tow [256];
  logic [7:0] linv [256];
  logic [7:0] x, y, e_am, e_m, e_s;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s enc=%0b am=%h m=%h s=%h: got %h expected %h",
                 what, encrypt, am, m, s, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      tow[i]  = to_tower(8'(i));
      linv[i] = aes_lin_inv(8'(i));
    end
    // The reference map must preserve products
    for (int k = 0; k < 500; k++) begin
      x = 8'($urandom);
      y = 8'($urandom);
      checks++;
      if (ref_mul256(tow[x], tow[y]) !== tow[aes_mul(x, y)]) failures++;
    end
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < 256; a++) begin
        encrypt = e[0];
        am = 8'(a);
        m  = 8'($urandom);
        s  = 8'($urandom);
        @(posedge clk);
        if (encrypt) begin
          e_am = tow[am];
          e_m  = tow[m];
          e_s  = tow[linv[s]];
        end else begin
          e_am = tow[linv[am ^ 8'h63]];
          e_m  = tow[linv[m]];
          e_s  = tow[s];
        end
        check("am_t", am_t, e_am);
        check("m_t", m_t, e_m);
        check("s_t", s_t, e_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
