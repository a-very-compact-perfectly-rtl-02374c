// gf16_mul -- multiplier in GF(2^4), normal basis [Z^4, Z] over GF(2^2).
//
// For A = {a1,a0} and B = {b1,b0} (2-bit GF(2^2) halves), the product is
//   e  = n * (a1 ^ a0) * (b1 ^ b0)
//   P  = {a1*b1 ^ e, a0*b0 ^ e}
// i.e. three GF(2^2) multipliers, one scaling by the norm n and four GF(2^2)
// additions, as the S-box design counts it. The masked inverter uses eight of
// these. The formula follows from Z^8 = Z^4 + n, Z^2 = Z + n and Z^5 = n; the
// gate-level sharing of factor sums between multipliers is left to synthesis.
//
// Interface: a, b factors; p product. Purely combinational, no clock.
module gf16_mul
  import gf_pkg::*;
(
  input  gf16_t a,
  input  gf16_t b,
  output gf16_t p
);

  gf4_t e;

  always_comb begin
    e = gf4_scl_n(gf4_mul(a[3:2] ^ a[1:0], b[3:2] ^ b[1:0]));
    p = {gf4_mul(a[3:2], b[3:2]) ^ e, gf4_mul(a[1:0], b[1:0]) ^ e};
  end

endmodule
