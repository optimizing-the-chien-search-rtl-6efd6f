// gf256_mul: GF(2^8) multiplier built from GF(2^4) parts, C = A * B.
//
// With A = A0 + beta*A1 and B = B0 + beta*B1 (beta^2 = beta + gamma):
//   C0 = A0*B0 + gamma*(A1*B1)
//   C1 = (A0+A1)*(B0+B1) + A0*B0
// so one GF(2^8) product costs three GF(2^4) multipliers, four GF(2^4) adders
// and one gamma multiplier, as in the document's block diagram.  The product
// A0*B0 is shared by both output adders.  Combinational.
module gf256_mul
  import gf_pkg::*;
(
  input  gf256_t a,
  input  gf256_t b,
  output gf256_t c
);
  gf16_t p11, p00, sa, sb, pss, g11;

  gf16_mul  u_m11 (.x(a.c1), .y(b.c1), .z(p11));
  gf16_mul  u_m00 (.x(a.c0), .y(b.c0), .z(p00));
  gf16_add  u_sa  (.a(a.c0), .b(a.c1), .y(sa));
  gf16_add  u_sb  (.a(b.c0), .b(b.c1), .y(sb));
  gf16_mul  u_mss (.x(sa),   .y(sb),   .z(pss));
  gf16_gamma_mul #(.POWER(1)) u_g (.a(p11), .y(g11));
  gf16_add  u_c0  (.a(p00), .b(g11), .y(c.c0));
  gf16_add  u_c1  (.a(pss), .b(p00), .y(c.c1));
endmodule
