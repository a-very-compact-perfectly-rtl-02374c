// tb_ref_pkg -- reference models for the masked S-box testbenches.
//
// Written independently of the RTL's formulas:
//  * Tower-field products come from basis-product tables: P16[i][j] is the
//    product of GF(2^4) basis bits i and j, P256[i][j] that of GF(2^8) basis
//    bits i and j (bit i of an element stands for one basis vector of the
//    normal-basis tower over GF(2)). A product is the XOR of the table
//    entries of all pairs of set bits (bilinearity).
//  * AES arithmetic works in the polynomial basis modulo
//    x^8 + x^4 + x^3 + x + 1; the inverse is a^254; the affine transform is
//    b_i = a_i ^ a_(i+4) ^ a_(i+5) ^ a_(i+6) ^ a_(i+7) ^ c_i, c = 8'h63.
//  * The isomorphism AES -> tower maps x to the tower element 8'h6A, so
//    a byte sum a_i*x^i maps to sum a_i*(8'h6A)^i, powers taken with P256.
package tb_ref_pkg;

  localparam logic [3:0][3:0][3:0] P16 = {
    {4'hb, 4'h6, 4'hf, 4'ha},
    {4'h6, 4'hd, 4'ha, 4'h5},
    {4'hf, 4'ha, 4'he, 4'h9},
    {4'ha, 4'h5, 4'h9, 4'h7}
  };

  localparam logic [7:0][7:0][7:0] P256 = {
    {8'h29, 8'h17, 8'hb4, 8'h6c, 8'h99, 8'h77, 8'h44, 8'hcc},
    {8'h17, 8'h3e, 8'h6c, 8'hd8, 8'h77, 8'hee, 8'hcc, 8'h88},
    {8'hb4, 8'h6c, 8'hf1, 8'ha3, 8'h44, 8'hcc, 8'h11, 8'h33},
    {8'h6c, 8'hd8, 8'ha3, 8'h52, 8'hcc, 8'h88, 8'h33, 8'h22},
    {8'h99, 8'h77, 8'h44, 8'hcc, 8'h92, 8'h71, 8'h4b, 8'hc6},
    {8'h77, 8'hee, 8'hcc, 8'h88, 8'h71, 8'he3, 8'hc6, 8'h8d},
    {8'h44, 8'hcc, 8'h11, 8'h33, 8'h4b, 8'hc6, 8'h1f, 8'h3a},
    {8'hcc, 8'h88, 8'h33, 8'h22, 8'hc6, 8'h8d, 8'h3a, 8'h25}
  };

  localparam logic [3:0] ONE16  = 4'hF;
  localparam logic [7:0] ONE256 = 8'hFF;
  localparam logic [3:0] NORM_N = 4'h4;   // norm of the GF(2^8)/GF(2^4) basis
  localparam logic [7:0] X_IMG  = 8'h6A;  // tower image of the AES element x

  function automatic logic [3:0] ref_mul16(logic [3:0] a, logic [3:0] b);
    logic [3:0] p = '0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        if (a[i] && b[j]) p ^= P16[i][j];
    return p;
  endfunction

  function automatic logic [3:0] ref_inv16(logic [3:0] a);
    for (int y = 0; y < 16; y++)
      if (ref_mul16(a, 4'(y)) == ONE16) return 4'(y);
    return 4'h0;
  endfunction

  function automatic logic [7:0] ref_mul256(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = '0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        if (a[i] && b[j]) p ^= P256[i][j];
    return p;
  endfunction

  function automatic logic [7:0] ref_inv256(logic [7:0] a);
    for (int y = 0; y < 256; y++)
      if (ref_mul256(a, 8'(y)) == ONE256) return 8'(y);
    return 8'h00;
  endfunction

  // AES field, polynomial basis
  function automatic logic [7:0] aes_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = '0;
    logic [7:0] x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1b) : (x << 1);
    end
    return p;
  endfunction

  function automatic logic [7:0] aes_inv(logic [7:0] a);
    logic [7:0] r = 8'h01;
    for (int i = 0; i < 254; i++) r = aes_mul(r, a);
    return r;   // a^254, 0 for a = 0
  endfunction

  function automatic logic [7:0] aes_lin(logic [7:0] a);
    logic [7:0] b;
    for (int i = 0; i < 8; i++)
      b[i] = a[i] ^ a[(i+4)%8] ^ a[(i+5)%8] ^ a[(i+6)%8] ^ a[(i+7)%8];
    return b;
  endfunction

  function automatic logic [7:0] aes_lin_inv(logic [7:0] b);
    for (int a = 0; a < 256; a++)
      if (aes_lin(8'(a)) == b) return 8'(a);
    return 8'h00;
  endfunction

  function automatic logic [7:0] aes_sbox(logic [7:0] a);
    return aes_lin(aes_inv(a)) ^ 8'h63;
  endfunction

  function automatic logic [7:0] aes_inv_sbox(logic [7:0] b);
    return aes_inv(aes_lin_inv(b ^ 8'h63));
  endfunction

  function automatic logic [7:0] to_tower(logic [7:0] a);
    logic [7:0] acc = '0;
    logic [7:0] pw  = ONE256;
    for (int i = 0; i < 8; i++) begin
      if (a[i]) acc ^= pw;
      pw = ref_mul256(pw, X_IMG);
    end
    return acc;
  endfunction

endpackage
