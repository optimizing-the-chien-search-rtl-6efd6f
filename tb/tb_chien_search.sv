// tb_chien_search: builds locator polynomials with known roots,
// d * (x - a^e1)(x - a^e2)(x - a^e3)(x - a^e4) for random distinct
// exponents and a random non-zero scale d, plus the worked example's
// alpha^71 x^4 + alpha^146 x^3 + alpha^65 x^2 + alpha^149 x + alpha^77
// (roots a^0..a^3), and checks every streamed value sigma(alpha^i), the
// root flags, root_count,
// root_loc, the 256-cycle start-to-done time and the one-evaluation-per-cycle stream.
module tb_chien_search;
  import gf_pkg::*;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;
  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  gf256_t     coef [5];
  logic       busy, root_valid, root_hit, done;
  logic [7:0] root_idx;
  gf256_t     root_val;
  logic [8:0] root_count;
  logic [7:0] root_loc [4];

  chien_search dut (.clk, .rst_n, .start, .coef, .busy, .root_valid, .root_idx, .root_val, .root_hit,
                    .done, .root_count, .root_loc);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  // sigma(alpha^i) = sum_k c[k] * alpha^(i*(4-k))
  function automatic logic [7:0] eval_ref(logic [7:0] c [5], int i);
    logic [7:0] acc;
    acc = 8'h00;
    for (int k = 0; k < 5; k++) acc ^= rc_mul(c[k], rc_exp(i * (4 - k)));
    return acc;
  endfunction

  // exps sorted ascending, all distinct
  task automatic run(logic [7:0] c [5], int nroot, int exps [4]);
    int cyc, nvalid, k;
    @(negedge clk);
    for (int i = 0; i < 5; i++) coef[i] = c[i];
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1; nvalid = 0; k = 0;
    forever begin
      if (root_valid) begin
        check("idx", 32'(root_idx), nvalid);
        check("val", 32'(root_val), 32'(eval_ref(c, nvalid)));
        check("hit", 32'(root_hit), 32'(k < nroot && exps[k] == nvalid));
        if (k < nroot && exps[k] == nvalid) k++;
        nvalid++;
      end
      if (done) break;
      @(negedge clk);
      cyc++;
    end
    check("evaluations", nvalid, 255);
    check("latency", cyc, 256);
    check("count", 32'(root_count), nroot);
    for (int i = 0; i < nroot && i < 4; i++) check("loc", 32'(root_loc[i]), exps[i]);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] c [5];
    logic [7:0] p [5];
    int e [4];
    for (int i = 0; i < 5; i++) coef[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    c = '{rc_exp(71), rc_exp(146), rc_exp(65), rc_exp(149), rc_exp(77)};
    e = '{0, 1, 2, 3};
    run(c, 4, e);
    for (int t = 0; t < 12; t++) begin
      // four distinct sorted exponents
      e[0] = $urandom_range(0, 60);
      e[1] = e[0] + $urandom_range(1, 60);
      e[2] = e[1] + $urandom_range(1, 60);
      e[3] = e[2] + $urandom_range(1, 60);
      // p(x) = prod (x + a^e), p[0] is the x^4 coefficient
      p = '{8'h01, 8'h00, 8'h00, 8'h00, 8'h00};
      for (int r = 0; r < 4; r++)
        for (int i = 4; i >= 1; i--) p[i] = p[i] ^ rc_mul(p[i-1], rc_exp(e[r]));
      c[0] = rc_exp($urandom_range(0, 254));
      for (int i = 1; i < 5; i++) c[i] = rc_mul(p[i], c[0]);
      c[0] = rc_mul(p[0], c[0]);
      run(c, 4, e);
    end
    // x^4 + 1 = (x + 1)^4 over GF(2^8): one root a^0 only
    c = '{8'h01, 8'h00, 8'h00, 8'h00, 8'h01};
    e = '{0, 0, 0, 0};
    run(c, 1, e);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
