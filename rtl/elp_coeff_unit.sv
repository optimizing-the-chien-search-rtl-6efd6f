// elp_coeff_unit: divider-free error-locator coefficients for the 4-error case.
//
// For syndromes S1..S8 the Hankel matrix A4[r][c] = S(r+c+1) and the vector
// b = (S5, S6, S7, S8) define sigma = A4^-1 * b.  Instead of inverting,
// the unit scales the polynomial by det(A4):
//   sigma' = Adj(A4) * b,   sigma'_0 = det(A4),
// so that det(A4)*x^4 + sigma'_1*x^3 + sigma'_2*x^2 + sigma'_3*x + sigma'_4
// has the same roots and no division is ever needed.  Entry c of
// Adj(A4)*b equals the determinant of A4 with column c replaced by b, so
// five 4x4 determinants are computed: A4 itself (-> det) and A4 with
// column 4-k replaced (-> sigma'_k).  Each determinant is a Laplace
// expansion over the 2x2 minors of rows 0-1 and rows 2-3 (signs vanish in
// characteristic 2): six pairs, five GF(2^8) products per pair, 30 products
// per determinant, 150 in all.
//
// Every product is issued to the micro-programmed GF(2^4) processor over a
// start/done request port (mul_*), one at a time; additions are XORs here.
// mul_op is always the MUL routine.
// Interface: a start pulse in IDLE latches syn (S1..S8 as GF(2^8) pairs);
// done pulses for one cycle when coef[0] = det and coef[1..4] = sigma'_1..4
// are valid; they hold until the next start.  With the processor's 10-cycle
// multiply each product takes 12 cycles (issue, 10 in the processor, the
// result cycle), so start to done is 150 * 12 + 1 = 1801 cycles.
// The scaling by det(A4), the adjugate form and the restriction to four
// errors follow the document; the Cramer/Laplace evaluation order is this
// design's own.
module elp_coeff_unit
  import gf_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  gf256_t   syn [8],      // syn[i] = S(i+1)
  output logic     busy,
  output logic     done,
  output gf256_t   coef [5],     // det(A4), sigma'_1 .. sigma'_4
  // product requests to the processor
  output logic     mul_start,
  output proc_op_e mul_op,
  output gf256_t   mul_a,
  output gf256_t   mul_b,
  input  logic     mul_done,
  input  gf256_t   mul_y
);
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;

  // Laplace pairs: rows 0-1 use columns (i,j), rows 2-3 the complement (k,l).
  localparam logic [1:0] PI [6] = '{2'd0, 2'd0, 2'd0, 2'd1, 2'd1, 2'd2};
  localparam logic [1:0] PJ [6] = '{2'd1, 2'd2, 2'd3, 2'd2, 2'd3, 2'd3};
  localparam logic [1:0] PK [6] = '{2'd2, 2'd1, 2'd1, 2'd0, 2'd0, 2'd0};
  localparam logic [1:0] PL [6] = '{2'd3, 2'd3, 2'd2, 2'd3, 2'd2, 2'd1};

  state_e     state;
  gf256_t     s_q [8];
  logic [2:0] mat;     // 0: A4, k = 1..4: column 4-k replaced by b
  logic [2:0] pair;    // 0..5
  logic [2:0] step;    // 0..4
  gf256_t     t_q, mm_q, nn_q, acc_q;
  gf256_t     opa, opb;

  // Element (r, c) of the current matrix.
  function automatic gf256_t elem(logic [2:0] m, logic [1:0] r, logic [1:0] c, gf256_t s [8]);
    if (m != 3'd0 && {1'b0, c} == 3'd4 - m) return s[3'd4 + 3'(r)];
    return s[3'(r) + 3'(c)];
  endfunction

  always_comb begin
    unique case (step)
      3'd0:    begin opa = elem(mat, 2'd0, PI[pair], s_q); opb = elem(mat, 2'd1, PJ[pair], s_q); end
      3'd1:    begin opa = elem(mat, 2'd0, PJ[pair], s_q); opb = elem(mat, 2'd1, PI[pair], s_q); end
      3'd2:    begin opa = elem(mat, 2'd2, PK[pair], s_q); opb = elem(mat, 2'd3, PL[pair], s_q); end
      3'd3:    begin opa = elem(mat, 2'd2, PL[pair], s_q); opb = elem(mat, 2'd3, PK[pair], s_q); end
      default: begin opa = mm_q; opb = nn_q; end
    endcase
  end

  assign mul_op = OP_MUL;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      mat       <= '0;
      pair      <= '0;
      step      <= '0;
      t_q       <= '0;
      mm_q      <= '0;
      nn_q      <= '0;
      acc_q     <= '0;
      mul_start <= 1'b0;
      mul_a     <= '0;
      mul_b     <= '0;
      done      <= 1'b0;
      for (int i = 0; i < 8; i++) s_q[i] <= '0;
      for (int i = 0; i < 5; i++) coef[i] <= '0;
    end else begin
      mul_start <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            for (int i = 0; i < 8; i++) s_q[i] <= syn[i];
            mat   <= '0;
            pair  <= '0;
            step  <= '0;
            acc_q <= '0;
            state <= S_ISSUE;
          end
        end
        S_ISSUE: begin
          mul_a     <= opa;
          mul_b     <= opb;
          mul_start <= 1'b1;
          state     <= S_WAIT;
        end
        S_WAIT: begin
          if (mul_done) begin
            state <= S_ISSUE;
            unique case (step)
              3'd0, 3'd2: t_q  <= mul_y;
              3'd1:       mm_q <= t_q ^ mul_y;
              3'd3:       nn_q <= t_q ^ mul_y;
              default:    acc_q <= acc_q ^ mul_y;
            endcase
            if (step != 3'd4) begin
              step <= step + 3'd1;
            end else begin
              step <= '0;
              if (pair != 3'd5) begin
                pair <= pair + 3'd1;
              end else begin
                pair          <= '0;
                coef[mat]     <= acc_q ^ mul_y;
                acc_q         <= '0;
                if (mat != 3'd4) begin
                  mat <= mat + 3'd1;
                end else begin
                  done  <= 1'b1;
                  state <= S_IDLE;
                end
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // A product is only requested after the previous one has returned.
  a_one_request: assert property (@(posedge clk) disable iff (!rst_n)
    mul_start |=> (state == S_WAIT));
endmodule
