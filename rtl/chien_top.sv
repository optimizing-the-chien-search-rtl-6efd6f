// chien_top: divider-free Chien search machine for a Reed-Solomon code over
// GF(2^8) with eight syndromes (four correctable errors).
//
// Data flow: the eight syndromes arrive as bytes in the polynomial basis of
// x^8 + x^4 + x^3 + x^2 + 1 and are mapped to (C1, C0) GF(2^4) pairs by eight
// converters.  The coefficient unit then forms det(A4) and
// sigma' = Adj(A4)*(S5..S8), sending each of its 150 GF(2^8) products to the
// micro-programmed GF(2^4) processor.  When the coefficients are ready the
// Chien search unit evaluates det*x^4 + sigma'_1*x^3 + sigma'_2*x^2 +
// sigma'_3*x + sigma'_4 at x = alpha^0 .. alpha^254, one point per cycle, and
// reports the zeros; the exponent i of a zero alpha^i is an error position.
//
// Interface: pulse start while busy is low with syn held stable for that
// cycle.  coef_valid pulses when coef is valid (coef[0] = det(A4)); the
// search starts on the next cycle, streams root_valid/root_idx/root_val/root_hit for
// 255 cycles and ends with a done pulse, when root_count and root_loc are
// final.  Start to coef_valid: 1801 cycles; coef_valid to done: 256 for the
// search.  The document supplies the arithmetic and the processor; the
// sequencing between the parts is this design's.
module chien_top
  import gf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] syn [8],       // S1..S8, polynomial basis
  output logic       busy,
  output logic       coef_valid,
  output gf256_t     coef [5],
  output logic       root_valid,
  output logic [7:0] root_idx,
  output gf256_t     root_val,      // sigma(alpha^root_idx), pair form
  output logic       root_hit,
  output logic       done,
  output logic [8:0] root_count,
  output logic [7:0] root_loc [4]
);
  gf256_t   syn_p [8];
  logic     elp_busy, cs_busy;
  logic     mul_start, mul_done, proc_busy;
  proc_op_e mul_op;
  gf256_t   mul_a, mul_b, mul_y;

  for (genvar i = 0; i < 8; i++) begin : g_conv
    gf256_to_gf16 u_conv (.b(syn[i]), .c(syn_p[i]));
  end

  elp_coeff_unit u_elp (
    .clk, .rst_n,
    .start     (start && !busy),
    .syn       (syn_p),
    .busy      (elp_busy),
    .done      (coef_valid),
    .coef      (coef),
    .mul_start (mul_start),
    .mul_op    (mul_op),
    .mul_a     (mul_a),
    .mul_b     (mul_b),
    .mul_done  (mul_done),
    .mul_y     (mul_y)
  );

  gf16_processor u_proc (
    .clk, .rst_n,
    .start (mul_start),
    .op    (mul_op),
    .a     (mul_a),
    .b     (mul_b),
    .busy  (proc_busy),
    .done  (mul_done),
    .y     (mul_y)
  );

  chien_search #(.N(255)) u_cs (
    .clk, .rst_n,
    .start      (coef_valid),
    .coef       (coef),
    .busy       (cs_busy),
    .root_valid (root_valid),
    .root_idx   (root_idx),
    .root_val   (root_val),
    .root_hit   (root_hit),
    .done       (done),
    .root_count (root_count),
    .root_loc   (root_loc)
  );

  assign busy = elp_busy || cs_busy || proc_busy || coef_valid;
endmodule
