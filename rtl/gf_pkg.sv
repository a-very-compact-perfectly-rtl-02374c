// gf_pkg -- shared types, GF(2^2) arithmetic and basis-change matrices of the
// masked AES S-box.
//
// Field representation (tower field, all normal bases):
//   GF(2^2): 2-bit {c1,c0} = c1*w^2 + c0*w, where w^2 + w + 1 = 0.
//            The element 1 is 2'b11. Squaring (= inversion) is a bit swap.
//   GF(2^4): 4-bit {A1,A0} = A1*Z^4 + A0*Z, A1,A0 in GF(2^2), where
//            Z^2 + Z + n = 0 with norm n = w^2 (2'b10). The element 1 is 4'hF.
//   GF(2^8): 8-bit {A1,A0} = A1*Y^16 + A0*Y, A1,A0 in GF(2^4), where
//            Y^2 + Y + N = 0 with norm N = w*Z^4 (4'h4). The element 1 is 8'hFF.
// The three-level normal-basis tower is the structure the S-box is built on;
// the particular norms n and N are a choice of this implementation: both
// polynomials are irreducible, and this N makes the square-scale N*X^2 cost
// only three XORs.
//
// Basis change. Let X be the element 8'h6A of the tower field above; X is a
// root of the AES polynomial x^8 + x^4 + x^3 + x + 1, so the AES byte
// a = sum a_i*x^i maps to sum a_i*X^i. Column i of T_ENC_IN is the tower
// representation of X^i. With L the linear part of the AES affine transform
// (b_i = a_i ^ a_(i+4) ^ a_(i+5) ^ a_(i+6) ^ a_(i+7), indices mod 8):
//   T_ENC_IN  = T            (AES basis -> tower, S-box input)
//   T_DEC_IN  = T * L^-1     (inverse S-box input, after adding 8'h63)
//   T_ENC_OUT = L * T^-1     (S-box output, before adding 8'h63)
//   T_DEC_OUT = T^-1         (inverse S-box output)
// Of the eight roots of the AES polynomial, 8'h6A is one of those giving the
// sparsest four matrices. Each matrix is stored by rows: bit r of the product
// is the parity of (row r AND input).
package gf_pkg;

  typedef logic [1:0] gf4_t;    // element of GF(2^2)
  typedef logic [3:0] gf16_t;   // element of GF(2^4)
  typedef logic [7:0] gf256_t;  // element of GF(2^8), tower or AES basis
  typedef logic [7:0][7:0] bitmat8_t;

  localparam bitmat8_t T_ENC_IN  = {8'h61, 8'h4f, 8'h9b, 8'h01, 8'h63, 8'he1, 8'he7, 8'h71};
  localparam bitmat8_t T_DEC_IN  = {8'h19, 8'h73, 8'hd0, 8'ha4, 8'h50, 8'h4b, 8'h90, 8'h53};
  localparam bitmat8_t T_ENC_OUT = {8'h28, 8'h22, 8'h41, 8'h2a, 8'h2f, 8'h79, 8'h8c, 8'h85};
  localparam bitmat8_t T_DEC_OUT = {8'h84, 8'heb, 8'h7b, 8'h81, 8'hbd, 8'h8e, 8'h88, 8'h10};

  // Additive constant of the AES affine transform.
  localparam gf256_t AFFINE_C = 8'h63;

  // Multiply in GF(2^2), normal basis [w^2, w]: with e = (a1^a0)&(b1^b0)
  // the product is {e ^ a1&b1, e ^ a0&b0}.
  function automatic gf4_t gf4_mul(gf4_t a, gf4_t b);
    logic e;
    e = (a[1] ^ a[0]) & (b[1] ^ b[0]);
    return {e ^ (a[1] & b[1]), e ^ (a[0] & b[0])};
  endfunction

  // Square in GF(2^2); equals the inverse, and is linear (a bit swap).
  function automatic gf4_t gf4_sq(gf4_t a);
    return {a[0], a[1]};
  endfunction

  // Scale by the norm n = w^2 in GF(2^2).
  function automatic gf4_t gf4_scl_n(gf4_t a);
    return {a[0], a[1] ^ a[0]};
  endfunction

  // Multiply an 8-bit vector by a bit matrix over GF(2).
  function automatic gf256_t mat_mul8(bitmat8_t m, gf256_t x);
    gf256_t y;
    for (int r = 0; r < 8; r++) y[r] = ^(m[r] & x);
    return y;
  endfunction

endpackage
