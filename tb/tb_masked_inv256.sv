// tb_masked_inv256 -- check of the masked GF(2^8) inverter (tower basis).
// Part 1: every data value A with 64 random mask pairs (M, S); the output
// with S removed must be A^-1 (0 for 0), from a reference inverse found by
// search with the basis-product multiplication of tb_ref_pkg.
// Part 2 (masking property): for three data values, all 65536 mask pairs are
// applied and the histogram of every named intermediate value of the
// inverter, including those of its GF(2^4) inverter, is recorded; the
// histograms must be identical for the three data values.
module tb_masked_inv256;
  import gf_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS4 = 26;   // 4-bit intermediates
  localparam int NS2 = 16;   // 2-bit intermediates
  localparam int NDIST = 3;
  localparam logic [7:0] DIST_DATA [NDIST] = '{8'h00, 8'h01, 8'hb7};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  gf256_t am, m, s, inv_m;

  masked_inv256 dut (.am(am), .m(m), .s(s), .inv_m(inv_m));

  gf16_t sig4 [NS4];
  gf4_t  sig2 [NS2];

  always_comb begin
    sig4[0]  = dut.sqs_a;  sig4[1]  = dut.sqs_m;
    sig4[2]  = dut.p_a1a0; sig4[3]  = dut.p_a1m0; sig4[4] = dut.p_a0m1;
    sig4[5]  = dut.p_m1m0;
    sig4[6]  = dut.b_s1;   sig4[7]  = dut.b_s2;   sig4[8] = dut.b_s3;
    sig4[9]  = dut.b_s4;   sig4[10] = dut.b_s5;   sig4[11] = dut.b_m;
    sig4[12] = dut.binv_m; sig4[13] = dut.b2;
    sig4[14] = dut.p_a0bi; sig4[15] = dut.p_m0bi;
    sig4[16] = dut.p_a1b2; sig4[17] = dut.p_m1b2;
    sig4[18] = dut.h_s1;   sig4[19] = dut.h_s2;   sig4[20] = dut.h_s3;
    sig4[21] = dut.h_s4;
    sig4[22] = dut.l_s1;   sig4[23] = dut.l_s2;   sig4[24] = dut.l_s3;
    sig4[25] = dut.l_s4;
    sig2[0]  = dut.u_inv16.c_s1; sig2[1]  = dut.u_inv16.c_s2;
    sig2[2]  = dut.u_inv16.c_s3; sig2[3]  = dut.u_inv16.c_s4;
    sig2[4]  = dut.u_inv16.c_s5; sig2[5]  = dut.u_inv16.c_m;
    sig2[6]  = dut.u_inv16.ci;   sig2[7]  = dut.u_inv16.c2;
    sig2[8]  = dut.u_inv16.h_s1; sig2[9]  = dut.u_inv16.h_s2;
    sig2[10] = dut.u_inv16.h_s3; sig2[11] = dut.u_inv16.h_s4;
    sig2[12] = dut.u_inv16.l_s1; sig2[13] = dut.u_inv16.l_s2;
    sig2[14] = dut.u_inv16.l_s3; sig2[15] = dut.u_inv16.l_s4;
  end

  int hist4 [NDIST][NS4][16];
  int hist2 [NDIST][NS2][4];
  logic [7:0] inv_tab [256];
  logic [7:0] data;
  int zero_seen = 0;

  initial begin : watchdog
    repeat (260000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) inv_tab[i] = ref_inv256(8'(i));
    // Part 1: function
    for (int a = 0; a < 256; a++) begin
      for (int k = 0; k < 64; k++) begin
        data = 8'(a);
        m  = 8'($urandom);
        s  = 8'($urandom);
        am = data ^ m;
        @(posedge clk);
        checks++;
        if (data == 8'h00) zero_seen++;
        if ((inv_m ^ s) !== inv_tab[a]) begin
          failures++;
          if (failures < 10)
            $display("FAIL A=%h M=%h S=%h: out^S=%h expected %h",
                     data, m, s, inv_m ^ s, inv_tab[a]);
        end
      end
    end
    // Part 2: distributions over all masks
    foreach (hist4[d, i, v]) hist4[d][i][v] = 0;
    foreach (hist2[d, i, v]) hist2[d][i][v] = 0;
    for (int d = 0; d < NDIST; d++) begin
      data = DIST_DATA[d];
      for (int k = 0; k < 65536; k++) begin
        m  = 8'(k);
        s  = 8'(k >> 8);
        am = data ^ m;
        @(posedge clk);
        for (int i = 0; i < NS4; i++) hist4[d][i][sig4[i]]++;
        for (int i = 0; i < NS2; i++) hist2[d][i][sig2[i]]++;
      end
    end
    for (int d = 1; d < NDIST; d++) begin
      for (int i = 0; i < NS4; i++) begin
        checks++;
        if (hist4[d][i] != hist4[0][i]) begin
          failures++;
          $display("FAIL 4-bit intermediate %0d depends on the data (A=%h)", i, DIST_DATA[d]);
        end
      end
      for (int i = 0; i < NS2; i++) begin
        checks++;
        if (hist2[d][i] != hist2[0][i]) begin
          failures++;
          $display("FAIL 2-bit intermediate %0d depends on the data (A=%h)", i, DIST_DATA[d]);
        end
      end
    end
    checks++;
    if (zero_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
