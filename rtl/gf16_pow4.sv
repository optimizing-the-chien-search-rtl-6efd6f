// gf16_pow4: GF(2^4) fourth-power circuit, y = a^4 modulo x^4 + x^3 + 1.
//
// The squarer applied twice collapses to four XOR gates:
// y0 = (a0^a1)^a3, y1 = a2^a3, y2 = a2, y3 = a1^a2.  Combinational, one
// XOR level shallower than a multiplier's tree, which is what lets it run
// beside the multiplier without lengthening the cycle.  The four-XOR
// structure is the document's; the exact connections follow from the
// polynomial.
module gf16_pow4
  import gf_pkg::*;
(
  input  gf16_t a,
  output gf16_t y
);
  logic a01;

  always_comb begin
    a01  = a[0] ^ a[1];
    y[0] = a01 ^ a[3];
    y[1] = a[2] ^ a[3];
    y[2] = a[2];
    y[3] = a[1] ^ a[2];
  end
endmodule
