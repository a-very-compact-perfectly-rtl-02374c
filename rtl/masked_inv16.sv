// masked_inv16 -- masked inversion in GF(2^4) (normal basis [Z^4, Z]).
//
// Input is B masked additively by Q (bm = B ^ Q); output is B^-1 masked by T
// (binv_m = B^-1 ^ T). The data is never unmasked. Writing bm = {b1,b0},
// q = {q1,q0}, t = {t1,t0} (2-bit GF(2^2) halves) and r a 2-bit mask:
//   c~    = r ^ n(b1^b0)^2 ^ n(q1^q0)^2 ^ b1*b0 ^ b1*q0 ^ b0*q1 ^ q1*q0
//           (= c ^ r, c the GF(2^2) norm of B)
//   ci    = swap(c~) ^ (q1 ^ r^2)        (= c^-1 ^ q1, re-masked)
//   binv1 = t1 ^ b0*ci ^ b0*q1 ^ q0*ci ^ q0*q1
//   c2    = ci ^ (q0 ^ q1)               (= c^-1 ^ q0)
//   binv0 = t0 ^ b1*c2 ^ b1*q0 ^ q1*c2 ^ q1*q0
// The products b1*q0, b0*q1 and q1*q0 of the first line are computed once and
// re-used. Inversion in GF(2^2) is a bit swap and therefore linear, which is
// why the mask passes through it unchanged but for a swap.
//
// Mask requirements (caller's duty): q uniform and independent of B; r
// independent of q; t independent of q and r. Every sum starts with the fresh
// mask and adds one term at a time in the order written above, so that each
// partial sum stays uniformly distributed. The RTL names each partial sum to
// keep that order visible; logic synthesis is free to re-associate XORs, and
// timing effects (glitches) in the final circuit are outside this model.
//
// The equations and the order of summation follow the published masked
// inverter; signal names and the split into named partial sums are this
// design's. Interface: bm, q, r, t in; binv_m out. Purely combinational.
module masked_inv16
  import gf_pkg::*;
(
  input  gf16_t bm,      // B ^ Q
  input  gf16_t q,       // mask of the input
  input  gf4_t  r,       // fresh mask for the GF(2^2) norm
  input  gf16_t t,       // mask wanted on the output
  output gf16_t binv_m   // B^-1 ^ T
);

  gf4_t b1, b0, q1, q0;
  gf4_t p_b1q0, p_b0q1, p_q1q0;
  gf4_t c_s1, c_s2, c_s3, c_s4, c_s5, c_m;
  gf4_t ci, c2;
  gf4_t h_s1, h_s2, h_s3, h_s4;
  gf4_t l_s1, l_s2, l_s3, l_s4;

  always_comb begin
    b1 = bm[3:2];
    b0 = bm[1:0];
    q1 = q[3:2];
    q0 = q[1:0];

    // Shared products (re-used below)
    p_b1q0 = gf4_mul(b1, q0);
    p_b0q1 = gf4_mul(b0, q1);
    p_q1q0 = gf4_mul(q1, q0);

    // Masked norm c~, mask r added first
    c_s1 = r    ^ gf4_scl_n(gf4_sq(b1 ^ b0));
    c_s2 = c_s1 ^ gf4_scl_n(gf4_sq(q1 ^ q0));
    c_s3 = c_s2 ^ gf4_mul(b1, b0);
    c_s4 = c_s3 ^ p_b1q0;
    c_s5 = c_s4 ^ p_b0q1;
    c_m  = c_s5 ^ p_q1q0;

    // Inversion by bit swap, then change of mask from r^2 to q1
    ci = gf4_sq(c_m) ^ (q1 ^ gf4_sq(r));

    // Upper half of B^-1, masked by t1
    h_s1   = t[3:2] ^ gf4_mul(b0, ci);
    h_s2   = h_s1   ^ p_b0q1;
    h_s3   = h_s2   ^ gf4_mul(q0, ci);
    h_s4   = h_s3   ^ p_q1q0;

    // Change of mask from q1 to q0
    c2 = ci ^ (q0 ^ q1);

    // Lower half of B^-1, masked by t0
    l_s1   = t[1:0] ^ gf4_mul(b1, c2);
    l_s2   = l_s1   ^ p_b1q0;
    l_s3   = l_s2   ^ gf4_mul(q1, c2);
    l_s4   = l_s3   ^ p_q1q0;

    binv_m = {h_s4, l_s4};
  end

endmodule
