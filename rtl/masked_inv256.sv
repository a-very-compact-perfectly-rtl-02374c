// masked_inv256 -- masked Galois inverter in GF(2^8), tower-field form.
//
// Input is A masked by M (am = A ^ M), output is A^-1 masked by an
// independent output mask S (inv_m = A^-1 ^ S); zero maps to zero. With
// am = {A1,A0}, m = {M1,M0}, s = {S1,S0} (4-bit GF(2^4) halves):
//   B~    = Q ^ N(A1^A0)^2 ^ N(M1^M0)^2 ^ A1*A0 ^ A1*M0 ^ A0*M1 ^ M1*M0
//           (= B ^ Q, B = N(a1^a0)^2 ^ a1*a0 the GF(2^4) norm of A)
//   Binv  = masked_inv16(B~)                      (= B^-1 ^ M1)
//   Ainv1 = S1 ^ A0*Binv ^ A0*M1 ^ M0*Binv ^ M0*M1
//   B2    = Binv ^ (M0 ^ M1)                      (= B^-1 ^ M0)
//   Ainv0 = S0 ^ A1*B2 ^ A1*M0 ^ M1*B2 ^ M1*M0
// This uses eight GF(2^4) multipliers and two square-scale units; the
// products A1*M0, A0*M1 and M1*M0 are shared between the first line and the
// last two. Each sum begins with a fresh mask and adds one term at a time.
//
// Masks (S independent of M, as the two-mask scheme requires):
//   Q = S1 (any 4 bits of S may serve), the mask of B~;
//   r = upper GF(2^2) half of M0, the mask of the GF(2^2) norm;
//   T = M1, the mask of the GF(2^4) inverse.
// The choice of which bits of S and M serve as Q and r is this design's: r
// is taken from M0 so that it is independent of T = M1.
//
// Interface: am, m (tower basis), s (tower basis) in; inv_m out.
// Purely combinational.
module masked_inv256
  import gf_pkg::*;
(
  input  gf256_t am,     // A ^ M
  input  gf256_t m,      // input mask M
  input  gf256_t s,      // output mask S
  output gf256_t inv_m   // A^-1 ^ S
);

  gf16_t a1, a0, m1, m0, s1, s0, q;
  gf4_t  r;

  gf16_t sqs_a, sqs_m;
  gf16_t p_a1a0, p_a1m0, p_a0m1, p_m1m0;
  gf16_t b_s1, b_s2, b_s3, b_s4, b_s5, b_m;
  gf16_t binv_m, b2;
  gf16_t p_a0bi, p_m0bi, p_a1b2, p_m1b2;
  gf16_t h_s1, h_s2, h_s3, h_s4;
  gf16_t l_s1, l_s2, l_s3, l_s4;

  assign a1 = am[7:4];
  assign a0 = am[3:0];
  assign m1 = m[7:4];
  assign m0 = m[3:0];
  assign s1 = s[7:4];
  assign s0 = s[3:0];
  assign q  = s1;
  assign r  = m0[3:2];

  gf16_sq_scl u_sqs_a (.x(a1 ^ a0), .y(sqs_a));
  gf16_sq_scl u_sqs_m (.x(m1 ^ m0), .y(sqs_m));

  gf16_mul u_mul_a1a0 (.a(a1), .b(a0), .p(p_a1a0));
  gf16_mul u_mul_a1m0 (.a(a1), .b(m0), .p(p_a1m0));
  gf16_mul u_mul_a0m1 (.a(a0), .b(m1), .p(p_a0m1));
  gf16_mul u_mul_m1m0 (.a(m1), .b(m0), .p(p_m1m0));

  // Masked GF(2^4) norm B~, mask Q added first
  always_comb begin
    b_s1 = q    ^ sqs_a;
    b_s2 = b_s1 ^ sqs_m;
    b_s3 = b_s2 ^ p_a1a0;
    b_s4 = b_s3 ^ p_a1m0;
    b_s5 = b_s4 ^ p_a0m1;
    b_m  = b_s5 ^ p_m1m0;
  end

  masked_inv16 u_inv16 (.bm(b_m), .q(q), .r(r), .t(m1), .binv_m(binv_m));

  gf16_mul u_mul_a0bi (.a(a0), .b(binv_m), .p(p_a0bi));
  gf16_mul u_mul_m0bi (.a(m0), .b(binv_m), .p(p_m0bi));

  // Change of mask on B^-1 from M1 to M0
  assign b2 = binv_m ^ (m0 ^ m1);

  gf16_mul u_mul_a1b2 (.a(a1), .b(b2), .p(p_a1b2));
  gf16_mul u_mul_m1b2 (.a(m1), .b(b2), .p(p_m1b2));

  always_comb begin
    // Upper half of A^-1, masked by S1
    h_s1 = s1   ^ p_a0bi;
    h_s2 = h_s1 ^ p_a0m1;
    h_s3 = h_s2 ^ p_m0bi;
    h_s4 = h_s3 ^ p_m1m0;
    // Lower half of A^-1, masked by S0
    l_s1 = s0   ^ p_a1b2;
    l_s2 = l_s1 ^ p_a1m0;
    l_s3 = l_s2 ^ p_m1b2;
    l_s4 = l_s3 ^ p_m1m0;
    inv_m = {h_s4, l_s4};
  end

endmodule
