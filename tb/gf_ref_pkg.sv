// gf_ref_pkg: reference Galois-field arithmetic for the testbenches.
//
// Written independently of the RTL structure: GF(2^4) and GF(2^8) products
// are shift-and-add loops with polynomial reduction, the composite product
// treats a pair as a degree-1 polynomial in beta and reduces
// beta^2 = beta + gamma, and the polynomial-basis field uses
// x^8 + x^4 + x^3 + x^2 + 1.
package gf_ref_pkg;

  function automatic logic [3:0] r16_mul(logic [3:0] a, logic [3:0] b);
    logic [6:0] p;
    p = '0;
    for (int i = 0; i < 4; i++) if (b[i]) p ^= 7'(a) << i;
    for (int i = 6; i >= 4; i--) if (p[i]) p ^= 7'(5'b11001) << (i - 4);
    return p[3:0];
  endfunction

  function automatic logic [3:0] r16_pow(logic [3:0] a, int n);
    logic [3:0] r;
    r = 4'h1;
    for (int i = 0; i < n; i++) r = r16_mul(r, a);
    return r;
  endfunction

  // alpha16^k, k taken modulo 15
  function automatic logic [3:0] r16_exp(int k);
    return r16_pow(4'h2, ((k % 15) + 15) % 15);
  endfunction

  // Composite product: (a0 + b*a1)(b0 + b*b1) with b^2 = b + gamma, gamma = 2.
  function automatic logic [7:0] rc_mul(logic [7:0] a, logic [7:0] b);
    logic [3:0] p0, p1, p2;
    p0 = r16_mul(a[3:0], b[3:0]);
    p1 = r16_mul(a[3:0], b[7:4]) ^ r16_mul(a[7:4], b[3:0]);
    p2 = r16_mul(a[7:4], b[7:4]);
    // p2*beta^2 = p2*beta + p2*gamma
    return {p1 ^ p2, p0 ^ r16_mul(p2, 4'h2)};
  endfunction

  function automatic logic [7:0] rc_pow(logic [7:0] a, int n);
    logic [7:0] r;
    r = 8'h01;
    for (int i = 0; i < n; i++) r = rc_mul(r, a);
    return r;
  endfunction

  // alpha256^k in pair form; alpha256 = (C1 = D, C0 = B)
  function automatic logic [7:0] rc_exp(int k);
    return rc_pow(8'hDB, ((k % 255) + 255) % 255);
  endfunction

  // Polynomial-basis GF(2^8) product.
  function automatic logic [7:0] rs_mul(logic [7:0] a, logic [7:0] b);
    logic [14:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 15'(a) << i;
    for (int i = 14; i >= 8; i--) if (p[i]) p ^= 15'(9'h11D) << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] rs_exp(int k);
    logic [7:0] r;
    r = 8'h01;
    for (int i = 0; i < ((k % 255) + 255) % 255; i++) r = rs_mul(r, 8'h02);
    return r;
  endfunction

  // Discrete log of a non-zero pair (brute force), -1 for zero.
  function automatic int rc_log(logic [7:0] a);
    logic [7:0] r;
    if (a == 8'h00) return -1;
    r = 8'h01;
    for (int i = 0; i < 255; i++) begin
      if (r == a) return i;
      r = rc_mul(r, 8'hDB);
    end
    return -2;
  endfunction

  // Pair form of a polynomial-basis byte, via the powers of alpha.
  function automatic logic [7:0] r_to_pair(logic [7:0] x);
    logic [7:0] r;
    r = 8'h00;
    for (int i = 0; i < 8; i++) if (x[i]) r ^= rc_exp(i);
    return r;
  endfunction

  // Determinant of a 4x4 pair-form matrix by full permutation expansion.
  function automatic logic [7:0] rc_det4(logic [7:0] m [4][4]);
    logic [7:0] acc, t;
    acc = 8'h00;
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        for (int c = 0; c < 4; c++)
          for (int d = 0; d < 4; d++)
            if (a != b && a != c && a != d && b != c && b != d && c != d) begin
              t = rc_mul(rc_mul(m[0][a], m[1][b]), rc_mul(m[2][c], m[3][d]));
              acc ^= t;
            end
    return acc;
  endfunction

endpackage
