// gf256_pow4: GF(2^8) fourth power from GF(2^4) parts, E = A^4.
//
// Squaring the pair twice gives E1 = A1^4 and
// E0 = A0^4 + gamma^2*A1^4 + gamma*A1^4.  The circuit follows the document's
// drawing: two GF(2^4) X^4 circuits, a gamma^2 and a gamma multiplier on A1^4,
// and two adders, the first adding A0^4 and gamma^2*A1^4, the second adding
// gamma*A1^4.  Combinational.
module gf256_pow4
  import gf_pkg::*;
(
  input  gf256_t a,
  output gf256_t e
);
  gf16_t q0, q1, g1, g2, part;

  gf16_pow4 u_q0 (.a(a.c0), .y(q0));
  gf16_pow4 u_q1 (.a(a.c1), .y(q1));
  gf16_gamma_mul #(.POWER(2)) u_g2 (.a(q1), .y(g2));
  gf16_gamma_mul #(.POWER(1)) u_g1 (.a(q1), .y(g1));
  gf16_add u_a0 (.a(q0),   .b(g2), .y(part));
  gf16_add u_a1 (.a(part), .b(g1), .y(e.c0));
  assign e.c1 = q1;
endmodule
