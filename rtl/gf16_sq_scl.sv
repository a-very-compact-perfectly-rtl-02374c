// gf16_sq_scl -- combined square-and-scale N*X^2 in GF(2^4).
//
// In the GF(2^8) inversion the subfield square is always followed by scaling
// with the norm N of the GF(2^8)/GF(2^4) basis, so the two are one linear map
// over GF(2). With this design's N = w*Z^4 (4'h4, see gf_pkg) the map needs
// three XORs:
//   y[3] = x[3]^x[2], y[2] = x[2], y[1] = x[2]^x[0], y[0] = x[3]^x[1].
// The map is the 4x4 bit matrix whose column i is N*(e_i)^2 for basis element
// e_i; the three-XOR cost is what the S-box design reports for this operation.
//
// Output bit 2 is input bit 2 unchanged; that is a property of the map, not
// an unconnected output.
//
// Interface: x operand, y = N*x^2. Purely combinational.
module gf16_sq_scl
  import gf_pkg::*;
(
  input  gf16_t x,
  output gf16_t y
);

  always_comb begin
    y = {x[3] ^ x[2], x[2], x[2] ^ x[0], x[3] ^ x[1]};
  end

endmodule
