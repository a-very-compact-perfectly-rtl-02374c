// tb_masked_inv16 -- exhaustive check of the masked GF(2^4) inverter.
// For every data value B and every mask triple (Q, r, T) the unmasked output
// must be the inverse of B (0 for 0). It also checks the masking property:
// for each named partial sum inside the inverter, the histogram of its values
// over all masks must be the same for every B (distribution independent of
// the data).
module tb_masked_inv16;
  import gf_pkg::*;
  import tb_ref_pkg::*;

  localparam int NSIG = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  gf16_t bm, q, t, binv_m;
  gf4_t  r;

  masked_inv16 dut (.bm(bm), .q(q), .r(r), .t(t), .binv_m(binv_m));

  int hist_ref [NSIG][4];
  int hist_cur [NSIG][4];
  gf4_t sig [NSIG];

  always_comb begin
    sig[0]  = dut.c_s1;  sig[1]  = dut.c_s2;  sig[2]  = dut.c_s3;
    sig[3]  = dut.c_s4;  sig[4]  = dut.c_s5;  sig[5]  = dut.c_m;
    sig[6]  = dut.ci;    sig[7]  = dut.c2;
    sig[8]  = dut.h_s1;  sig[9]  = dut.h_s2;  sig[10] = dut.h_s3;
    sig[11] = dut.h_s4;  sig[12] = dut.l_s1;  sig[13] = dut.l_s2;
    sig[14] = dut.l_s3;  sig[15] = dut.l_s4;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] data, expect_inv;
  int zero_seen = 0;

  initial begin
    for (int b = 0; b < 16; b++) begin
      data = 4'(b);
      expect_inv = ref_inv16(data);
      foreach (hist_cur[i, v]) hist_cur[i][v] = 0;
      for (int k = 0; k < 1024; k++) begin
        q  = 4'(k);
        r  = 2'(k >> 4);
        t  = 4'(k >> 6);
        bm = data ^ q;
        @(posedge clk);
        checks++;
        if ((binv_m ^ t) !== expect_inv) begin
          failures++;
          if (failures < 10)
            $display("FAIL B=%h Q=%h r=%h T=%h: out^T=%h expected %h",
                     data, q, r, t, binv_m ^ t, expect_inv);
        end
        for (int i = 0; i < NSIG; i++) hist_cur[i][sig[i]]++;
      end
      if (b == 0) begin
        zero_seen = 1;
        foreach (hist_ref[i, v]) hist_ref[i][v] = hist_cur[i][v];
      end else begin
        for (int i = 0; i < NSIG; i++) begin
          checks++;
          for (int v = 0; v < 4; v++)
            if (hist_cur[i][v] != hist_ref[i][v]) begin
              failures++;
              $display("FAIL partial sum %0d: distribution depends on B=%h", i, data);
              break;
            end
        end
      end
    end
    checks++;
    if (!zero_seen) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
