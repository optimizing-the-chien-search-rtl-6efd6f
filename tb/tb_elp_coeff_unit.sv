// tb_elp_coeff_unit: the coefficient unit with the GF(2^4) processor as its
// multiplier.  First the worked 4-error example (received word
// (a^13, a^8, a^5, 1, 0, ...)): det(A4) = a^71, sigma'_4 = a^77,
// sigma'_3 = a^149, sigma'_2 = a^65, sigma'_1 = a^146.  Then random
// syndrome sets against a reference adjugate built from full permutation
// determinants (Cramer).  Also checks the 1801-cycle latency.
module tb_elp_coeff_unit;
  import gf_pkg::*;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;
  logic     clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  gf256_t   syn [8];
  gf256_t   coef [5];
  logic     busy, done;
  logic     mul_start, mul_done, pbusy;
  proc_op_e mul_op;
  gf256_t   mul_a, mul_b, mul_y;

  elp_coeff_unit dut (.clk, .rst_n, .start, .syn, .busy, .done, .coef,
                      .mul_start, .mul_op, .mul_a, .mul_b, .mul_done, .mul_y);
  gf16_processor u_proc (.clk, .rst_n, .start(mul_start), .op(mul_op), .a(mul_a), .b(mul_b),
                         .busy(pbusy), .done(mul_done), .y(mul_y));

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic run(logic [7:0] s [8]);
    logic [7:0] m [4][4];
    logic [7:0] ref_c [5];
    int cyc;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) m[r][c] = s[r + c];
    ref_c[0] = rc_det4(m);
    for (int k = 1; k <= 4; k++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
        m[r][c] = (c == 4 - k) ? s[4 + r] : s[r + c];
      ref_c[k] = rc_det4(m);
    end
    @(negedge clk);
    for (int i = 0; i < 8; i++) syn[i] = s[i];
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    for (int k = 0; k < 5; k++) check($sformatf("coef%0d", k), 32'(coef[k]), 32'(ref_c[k]));
    check("latency", cyc, 1801);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] s [8];
    logic [7:0] rw [4];
    for (int i = 0; i < 8; i++) syn[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // worked example: syndromes S_j = r(alpha^j) of r = (a^13, a^8, a^5, 1)
    rw = '{rc_exp(13), rc_exp(8), rc_exp(5), rc_exp(0)};
    for (int j = 1; j <= 8; j++) begin
      s[j-1] = 8'h00;
      for (int p = 0; p < 4; p++) s[j-1] ^= rc_mul(rw[p], rc_exp(j * p));
    end
    check("S1", 32'(s[0]), 32'(rc_exp(39)));
    check("S7", 32'(s[6]), 32'(rc_exp(254)));
    run(s);
    check("det a^71",    32'(coef[0]), 32'(rc_exp(71)));
    check("s'1 a^146",   32'(coef[1]), 32'(rc_exp(146)));
    check("s'2 a^65",    32'(coef[2]), 32'(rc_exp(65)));
    check("s'3 a^149",   32'(coef[3]), 32'(rc_exp(149)));
    check("s'4 a^77",    32'(coef[4]), 32'(rc_exp(77)));
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < 8; i++) s[i] = 8'($urandom);
      run(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
