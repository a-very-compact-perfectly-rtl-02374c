// masked_basis_out -- output basis change of the merged masked S-box.
//
// Converts the masked inverse from the tower-field basis back to the AES
// polynomial basis (see gf_pkg for the matrices):
//   encrypt=1: y = T_ENC_OUT * x_t ^ 8'h63   (affine transform folded in)
//   encrypt=0: y = T_DEC_OUT * x_t
// The transform is affine, so a tower-basis mask S_t on x_t becomes the mask
// T_ENC_OUT*S_t (or T_DEC_OUT*S_t) on y; masked_basis_in chooses S_t so that
// this is the caller's output mask S. Folding the affine transform into the
// output matrix follows the published merged architecture; the matrices
// themselves belong to this design's choice of tower basis.
//
// Interface: x_t (tower basis), encrypt in; y (AES basis) out.
// Purely combinational.
module masked_basis_out
  import gf_pkg::*;
(
  input  gf256_t x_t,
  input  logic   encrypt,
  output gf256_t y
);

  always_comb begin
    if (encrypt) y = mat_mul8(T_ENC_OUT, x_t) ^ AFFINE_C;
    else         y = mat_mul8(T_DEC_OUT, x_t);
  end

endmodule
