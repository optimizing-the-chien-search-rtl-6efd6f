// chien_search: Chien search over GF(2^8) on the divider-free locator
//   sigma(x) = det*x^4 + sigma'_1*x^3 + sigma'_2*x^2 + sigma'_3*x + sigma'_4.
//
// One field element is tested per clock, x = alpha^0, alpha^1, ...,
// alpha^(N-1).  For the current x the powers are formed in parallel:
// x^2 by the GF(2^8) squarer, x^4 by the GF(2^8) fourth-power circuit (both
// only XOR networks and gamma constants) and x^3 = x^2 * x by a GF(2^8)
// multiplier.  Four more GF(2^8) multipliers weight the powers with the
// coefficients and an XOR tree sums them; a zero sum marks a root.  The next
// x is x*alpha, formed by a sixth multiplier.  All arithmetic uses the
// (C1, C0) GF(2^4) pair form.
//
// Interface: a start pulse while idle latches coef (coef[0] = det,
// coef[k] = sigma'_k).  Starting one cycle later, root_valid is high for N
// consecutive cycles with root_idx = i, root_val = sigma(alpha^i) and
// root_hit = (root_val == 0).
// done pulses together with the last root_valid; root_count and root_loc
// (exponents of the first four roots, in order) are then final and hold
// until the next start.  Latency from start to done: N + 1 cycles.
// Computing x^2, x^4 and x^3 with separate units in parallel is the
// document's; one evaluation per cycle is this design's choice.
module chien_search
  import gf_pkg::*;
#(
  parameter int unsigned N = 255
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  gf256_t     coef [5],
  output logic       busy,
  output logic       root_valid,
  output logic [7:0] root_idx,
  output gf256_t     root_val,
  output logic       root_hit,
  output logic       done,
  output logic [8:0] root_count,
  output logic [7:0] root_loc [4]
);
  logic       running;
  gf256_t     coef_q [5];
  gf256_t     x_q, x2, x3, x4, x_next;
  gf256_t     term [5];
  gf256_t     sum;
  logic [7:0] idx_q;

  gf256_sq   u_x2  (.a(x_q), .d(x2));
  gf256_pow4 u_x4  (.a(x_q), .e(x4));
  gf256_mul  u_x3  (.a(x2),  .b(x_q), .c(x3));
  gf256_mul  u_t0  (.a(coef_q[0]), .b(x4),  .c(term[0]));
  gf256_mul  u_t1  (.a(coef_q[1]), .b(x3),  .c(term[1]));
  gf256_mul  u_t2  (.a(coef_q[2]), .b(x2),  .c(term[2]));
  gf256_mul  u_t3  (.a(coef_q[3]), .b(x_q), .c(term[3]));
  gf256_mul  u_nx  (.a(x_q), .b(ALPHA256), .c(x_next));

  assign term[4] = coef_q[4];

  always_comb begin
    sum = '0;
    for (int k = 0; k < 5; k++) sum ^= term[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running    <= 1'b0;
      x_q        <= GF256_ONE;
      idx_q      <= '0;
      root_valid <= 1'b0;
      root_idx   <= '0;
      root_val   <= '0;
      root_hit   <= 1'b0;
      done       <= 1'b0;
      root_count <= '0;
      for (int k = 0; k < 5; k++) coef_q[k] <= '0;
      for (int k = 0; k < 4; k++) root_loc[k] <= '0;
    end else begin
      root_valid <= 1'b0;
      root_hit   <= 1'b0;
      done       <= 1'b0;
      if (!running) begin
        if (start) begin
          for (int k = 0; k < 5; k++) coef_q[k] <= coef[k];
          for (int k = 0; k < 4; k++) root_loc[k] <= '0;
          x_q        <= GF256_ONE;
          idx_q      <= '0;
          root_count <= '0;
          running    <= 1'b1;
        end
      end else begin
        root_valid <= 1'b1;
        root_idx   <= idx_q;
        root_val   <= sum;
        root_hit   <= (sum == '0);
        if (sum == '0) begin
          root_count <= root_count + 9'd1;
          if (root_count < 9'd4) root_loc[root_count[1:0]] <= idx_q;
        end
        x_q   <= x_next;
        idx_q <= idx_q + 8'd1;
        if (32'(idx_q) == N - 1) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  assign busy = running;
endmodule
