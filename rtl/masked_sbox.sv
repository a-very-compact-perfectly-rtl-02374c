// masked_sbox -- merged "perfectly masked" AES S-box and inverse S-box.
//
// Computes SubBytes (encrypt=1) or InvSubBytes (encrypt=0) of a byte that is
// never present unmasked: the caller supplies the masked byte am = A ^ M, the
// input mask M and an independent output mask S, and receives
//   ym = SBOX(A) ^ S      or      ym = INV_SBOX(A) ^ S.
// The byte and both masks are moved into a tower-field basis
// (masked_basis_in), inverted there with mask correction terms
// (masked_inv256) and moved back, with the affine transform applied on the
// way in (decryption) or out (encryption) (masked_basis_out). S-box and
// inverse S-box share the one Galois inverter.
//
// Security relies on M and S being fresh, uniform and independent of each
// other and of the data; every intermediate value of the inverter is then
// uniform or has the distribution of a product of two uniform values, both
// independent of the data. This is an algorithmic property: glitches in a
// CMOS realization can still leak unless timing of the masked multipliers is
// controlled, which this RTL does not address.
//
// The merged structure with one shared inverter and two masks follows the
// published masked S-box. Taking both masks in the AES basis, and leaving out
// registers, are this design's choices.
//
// Interface: am, m, s, encrypt in; ym out. Purely combinational, no clock:
// the result is valid one combinational delay after the inputs.
module masked_sbox
  import gf_pkg::*;
(
  input  gf256_t am,       // masked input byte A ^ M (AES basis)
  input  gf256_t m,        // input mask M
  input  gf256_t s,        // output mask S, independent of M
  input  logic   encrypt,  // 1: S-box, 0: inverse S-box
  output gf256_t ym        // S-box (or inverse) of A, masked by S
);

  gf256_t am_t, m_t, s_t, inv_t;

  masked_basis_in u_in (
    .am(am), .m(m), .s(s), .encrypt(encrypt),
    .am_t(am_t), .m_t(m_t), .s_t(s_t)
  );

  masked_inv256 u_inv (.am(am_t), .m(m_t), .s(s_t), .inv_m(inv_t));

  masked_basis_out u_out (.x_t(inv_t), .encrypt(encrypt), .y(ym));

endmodule
