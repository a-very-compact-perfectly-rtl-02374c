// masked_basis_in -- input basis change of the merged masked S-box.
//
// Converts the masked data byte, the input mask M and the output mask S from
// the AES polynomial basis into the tower-field basis of the inverter. One
// inverter serves both directions, so each conversion is a 2:1 choice between
// two bit matrices (see gf_pkg):
//   encrypt=1: am_t = T_ENC_IN * am            m_t = T_ENC_IN * m
//   encrypt=0: am_t = T_DEC_IN * (am ^ 8'h63)  m_t = T_DEC_IN * m
// For decryption the inverse affine transform is folded into the matrix; its
// constant is applied to the data only, because a mask sees only the linear
// part of the transform. The output mask is converted with the inverse of the
// matrix that masked_basis_out will apply, so that the final result carries
// exactly S in the AES basis:
//   encrypt=1: s_t = T_DEC_IN * s   (T_DEC_IN = inverse of T_ENC_OUT)
//   encrypt=0: s_t = T_ENC_IN * s   (T_ENC_IN = inverse of T_DEC_OUT)
// Three byte-wide selections here and one in masked_basis_out make the 32
// multiplexers of the merged two-mask basis change. Giving S in the AES basis
// and converting it here is this design's reading of "the output mask is a
// parameter" of the S-box.
//
// Interface: am, m, s (AES basis), encrypt in; am_t, m_t, s_t out.
// Purely combinational.
module masked_basis_in
  import gf_pkg::*;
(
  input  gf256_t am,       // masked data byte A ^ M
  input  gf256_t m,        // input mask M
  input  gf256_t s,        // output mask S
  input  logic   encrypt,  // 1: S-box, 0: inverse S-box
  output gf256_t am_t,
  output gf256_t m_t,
  output gf256_t s_t
);

  always_comb begin
    if (encrypt) begin
      am_t = mat_mul8(T_ENC_IN, am);
      m_t  = mat_mul8(T_ENC_IN, m);
      s_t  = mat_mul8(T_DEC_IN, s);
    end else begin
      am_t = mat_mul8(T_DEC_IN, am ^ AFFINE_C);
      m_t  = mat_mul8(T_DEC_IN, m);
      s_t  = mat_mul8(T_ENC_IN, s);
    end
  end

endmodule
