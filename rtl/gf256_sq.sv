// gf256_sq: GF(2^8) squarer from GF(2^4) parts, D = A^2.
//
// (A0 + beta*A1)^2 = A0^2 + beta^2*A1^2 = (A0^2 + gamma*A1^2) + beta*A1^2, so
// D1 = A1^2 and D0 = A0^2 + gamma*A1^2: two GF(2^4) squarers, one gamma
// multiplier and one adder, following the document.  Combinational.
module gf256_sq
  import gf_pkg::*;
(
  input  gf256_t a,
  output gf256_t d
);
  gf16_t s0, s1, gs1;

  gf16_sq u_s0 (.a(a.c0), .y(s0));
  gf16_sq u_s1 (.a(a.c1), .y(s1));
  gf16_gamma_mul #(.POWER(1)) u_g (.a(s1), .y(gs1));
  gf16_add u_d0 (.a(s0), .b(gs1), .y(d.c0));
  assign d.c1 = s1;
endmodule
