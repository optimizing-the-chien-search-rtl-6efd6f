// gf16_mul: GF(2^4) multiplier, z = x * y modulo x^4 + x^3 + 1.
//
// A purely combinational AND/XOR array.  Three shared operand sums
// A = x2^x3, B = x1^A and C = x0^B are formed first; each product bit is then
// the XOR of four AND terms.  The z0 cone (A, B and the four ANDs
// x0y0, x3y1, A*y2, B*y3) is the structure the document draws as the
// multiplier's critical path; the z1..z3 cones are derived here from the
// same polynomial in the same style.
module gf16_mul
  import gf_pkg::*;
(
  input  gf16_t x,
  input  gf16_t y,
  output gf16_t z
);
  logic sa, sb, sc;

  always_comb begin
    sa = x[2] ^ x[3];
    sb = x[1] ^ sa;
    sc = x[0] ^ sb;
    z[0] = (x[0] & y[0]) ^ (x[3] & y[1]) ^ (sa   & y[2]) ^ (sb   & y[3]);
    z[1] = (x[1] & y[0]) ^ (x[0] & y[1]) ^ (x[3] & y[2]) ^ (sa   & y[3]);
    z[2] = (x[2] & y[0]) ^ (x[1] & y[1]) ^ (x[0] & y[2]) ^ (x[3] & y[3]);
    z[3] = (x[3] & y[0]) ^ (sa   & y[1]) ^ (sb   & y[2]) ^ (sc   & y[3]);
  end
endmodule
