// tb_chien_top: end-to-end test of the whole machine at its default sizes.
//
// Each case builds an error pattern of four non-zero byte errors at distinct
// positions, forms the eight syndromes S_j = sum e_k * alpha^(j*p_k) in the
// polynomial basis with the reference arithmetic, runs the machine and
// expects exactly the four positions back as roots, in increasing order.
// The first case is the worked example: received word
// (alpha^13, alpha^8, alpha^5, 1, 0, ...), coefficients alpha^71, alpha^146,
// alpha^65, alpha^149, alpha^77, error positions 0..3, and the non-zero
// values sigma(alpha^4) = alpha^220, sigma(alpha^254) = alpha^210.  The timing is
// checked (start to coef_valid 1801 cycles, then 256 to done), and the
// testbench counts the mechanisms it exercises: GF(2^8) products run as
// micro-programmed GF(2^4) routines, coefficient sets produced, roots and
// non-roots flagged, and start requests ignored while busy.  A mechanism seen zero times is a failure.
module tb_chien_top;
  import gf_pkg::*;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;
  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0] syn [8];
  logic       busy, coef_valid, root_valid, root_hit, done;
  gf256_t     coef [5];
  logic [7:0] root_idx;
  gf256_t     root_val;
  logic [8:0] root_count;
  logic [7:0] root_loc [4];

  gf256_t val4, val254;
  int n_products = 0, n_hits = 0, n_misses = 0, n_coef = 0, n_ignored = 0;

  chien_top dut (.clk, .rst_n, .start, .syn, .busy, .coef_valid, .coef, .root_valid,
                 .root_idx, .root_val, .root_hit, .done, .root_count, .root_loc);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (dut.mul_done)               n_products++;
    if (root_valid && root_hit)     n_hits++;
    if (root_valid && !root_hit)    n_misses++;
    if (coef_valid)                 n_coef++;
    if (start && busy)              n_ignored++;
    if (root_valid && root_idx == 8'd4)   val4   <= root_val;
    if (root_valid && root_idx == 8'd254) val254 <= root_val;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  // pos sorted ascending and distinct; val non-zero
  task automatic run(int pos [4], logic [7:0] val [4]);
    int cyc, k;
    int found [4];
    @(negedge clk);
    for (int j = 1; j <= 8; j++) begin
      syn[j-1] = 8'h00;
      for (int e = 0; e < 4; e++) syn[j-1] ^= rs_mul(val[e], rs_exp(j * pos[e]));
    end
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!coef_valid) begin
      // a second start while busy must be ignored
      if (cyc == 100) start = 1'b1;
      if (cyc == 101) start = 1'b0;
      @(negedge clk);
      cyc++;
    end
    check("coef latency", cyc, 1801);
    cyc = 0; k = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (root_valid && root_hit && k < 4) begin
        found[k] = int'(root_idx);
        k++;
      end
    end
    check("search latency", cyc, 256);
    check("root count", 32'(root_count), 4);
    for (int e = 0; e < 4; e++) begin
      check("root_loc", 32'(root_loc[e]), pos[e]);
      check("stream", found[e], pos[e]);
    end
    @(negedge clk);
    check("idle", 32'(busy), 0);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p [4];
    logic [7:0] v [4];
    for (int i = 0; i < 8; i++) syn[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // worked example
    p = '{0, 1, 2, 3};
    v = '{rs_exp(13), rs_exp(8), rs_exp(5), rs_exp(0)};
    run(p, v);
    check("det",  32'(coef[0]), 32'(rc_exp(71)));
    check("s'1",  32'(coef[1]), 32'(rc_exp(146)));
    check("s'2",  32'(coef[2]), 32'(rc_exp(65)));
    check("s'3",  32'(coef[3]), 32'(rc_exp(149)));
    check("s'4",  32'(coef[4]), 32'(rc_exp(77)));
    // non-zero entries of the error location table
    check("sigma(a^4)",   32'(val4),   32'(rc_exp(220)));
    check("sigma(a^254)", 32'(val254), 32'(rc_exp(210)));
    // random four-error patterns, including the last position 254
    for (int t = 0; t < 12; t++) begin
      p[0] = $urandom_range(0, 60);
      p[1] = p[0] + $urandom_range(1, 60);
      p[2] = p[1] + $urandom_range(1, 60);
      p[3] = (t == 0) ? 254 : p[2] + $urandom_range(1, 60);
      for (int e = 0; e < 4; e++) v[e] = 8'($urandom_range(1, 255));
      run(p, v);
    end
    $display("mechanisms: products=%0d coef_sets=%0d roots=%0d non_roots=%0d ignored_starts=%0d",
             n_products, n_coef, n_hits, n_misses, n_ignored);
    check("products per codeword", n_products, 150 * 13);
    if (n_products == 0) failures++;
    if (n_coef == 0)     failures++;
    if (n_hits == 0)     failures++;
    if (n_misses == 0)   failures++;
    if (n_ignored == 0)  failures++;
    checks += 5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
