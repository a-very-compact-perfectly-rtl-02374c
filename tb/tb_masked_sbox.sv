// tb_masked_sbox -- end-to-end check of the merged masked S-box.
//
// The reference is the AES S-box computed from its definition in the AES
// polynomial basis (inverse a^254, then the affine transform); inverse S-box
// likewise. For both directions every data byte is applied with 64 random
// independent mask pairs (M, S), plus all-zero masks and M = S; the output
// with S removed must equal SBOX(A) or INV_SBOX(A). A few FIPS-197 values
// are checked literally. Finally, a masked S-box output is fed back, still
// masked, into the inverse S-box (its mask becoming the new input mask),
// which must return the original byte.
//
// Events counted, each required at least once: encryptions, decryptions,
// inversions of the zero element (A = 00 encrypting, A = 63 decrypting),
// switches of the direction between consecutive bytes, and masked hand-overs
// from S-box to inverse S-box.
module tb_masked_sbox;
  import gf_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  gf256_t am, m, s, ym;
  logic encrypt;

  masked_sbox dut (.am(am), .m(m), .s(s), .encrypt(encrypt), .ym(ym));

  logic [7:0] sbox_tab [256];
  logic [7:0] isbox_tab [256];
  logic [7:0] data, expect_y, m2, s2, y1;
  logic prev_encrypt = 1'b0;
  int n_enc = 0, n_dec = 0, n_zero = 0, n_switch = 0, n_handover = 0;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one masked byte and check the result.
  task automatic apply(logic enc, logic [7:0] a, logic [7:0] mi, logic [7:0] so);
    encrypt = enc;
    m  = mi;
    s  = so;
    am = a ^ mi;
    @(posedge clk);
    expect_y = enc ? sbox_tab[a] : isbox_tab[a];
    checks++;
    if ((ym ^ so) !== expect_y) begin
      failures++;
      if (failures < 10)
        $display("FAIL enc=%0b A=%h M=%h S=%h: ym^S=%h expected %h",
                 enc, a, mi, so, ym ^ so, expect_y);
    end
    if (enc) n_enc++; else n_dec++;
    if ((enc && a == 8'h00) || (!enc && a == 8'h63)) n_zero++;
    if (enc != prev_encrypt) n_switch++;
    prev_encrypt = enc;
  endtask

  task automatic require(string what, int count);
    checks++;
    $display("event %-22s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL event '%s' never happened", what);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      sbox_tab[i]  = aes_sbox(8'(i));
      isbox_tab[i] = aes_inv_sbox(8'(i));
    end
    // Literal FIPS-197 values guard the reference model itself
    checks += 4;
    if (sbox_tab[8'h00] != 8'h63) failures++;
    if (sbox_tab[8'h53] != 8'hed) failures++;
    if (isbox_tab[8'h00] != 8'h52) failures++;
    if (isbox_tab[8'hed] != 8'h53) failures++;

    // All bytes, both directions, random independent masks
    for (int k = 0; k < 64; k++)
      for (int a = 0; a < 256; a++)
        for (int e = 1; e >= 0; e--)
          apply(e[0], 8'(a), 8'($urandom), 8'($urandom));

    // Special masks: none, and the same mask on input and output
    for (int a = 0; a < 256; a++) begin
      apply(1'b1, 8'(a), 8'h00, 8'h00);
      apply(1'b0, 8'(a), 8'h00, 8'h00);
      m2 = 8'($urandom);
      apply(1'b1, 8'(a), m2, m2);
      apply(1'b0, 8'(a), m2, m2);
    end

    // Masked hand-over: S-box output, still masked, into the inverse S-box
    for (int a = 0; a < 256; a++) begin
      data = 8'(a);
      m2 = 8'($urandom);
      s2 = 8'($urandom);
      apply(1'b1, data, m2, s2);
      y1 = ym;                       // SBOX(data) ^ s2
      encrypt = 1'b0;
      m  = s2;
      s  = 8'($urandom);
      am = y1;
      @(posedge clk);
      checks++;
      if ((ym ^ s) !== data) begin
        failures++;
        $display("FAIL hand-over A=%h: got %h", data, ym ^ s);
      end
      n_handover++;
      n_dec++;
      prev_encrypt = 1'b0;
    end

    require("encryption", n_enc);
    require("decryption", n_dec);
    require("zero inversion", n_zero);
    require("direction switch", n_switch);
    require("masked hand-over", n_handover);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
