// gf16_sq: GF(2^4) squarer, y = a^2 modulo x^4 + x^3 + 1.
//
// Squaring is linear over GF(2), so the circuit is three XOR gates and
// wires: y0 = a0^a2^a3, y1 = a3, y2 = a1^a3, y3 = a2^a3.  Combinational.
// The document uses such a squarer as one of its parallel GF(2^4) units; the
// gate equations are derived here from the field polynomial.
module gf16_sq
  import gf_pkg::*;
(
  input  gf16_t a,
  output gf16_t y
);
  always_comb begin
    y[0] = a[0] ^ a[2] ^ a[3];
    y[1] = a[3];
    y[2] = a[1] ^ a[3];
    y[3] = a[2] ^ a[3];
  end
endmodule
