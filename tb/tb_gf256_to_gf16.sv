// tb_gf256_to_gf16: checks the polynomial-basis to pair-form converter.
// For every byte the result must equal the reference map; the map must turn
// polynomial-basis products into pair-form products (a field isomorphism);
// and the syndromes of the worked example must land on the printed pairs.
module tb_gf256_to_gf16;
  import gf_pkg::*;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0] x, y;
  gf256_t     px, py, pxy;

  gf256_to_gf16 u_x  (.b(x), .c(px));
  gf256_to_gf16 u_y  (.b(y), .c(py));
  gf256_to_gf16 u_xy (.b(rs_mul(x, y)), .c(pxy));

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%h y=%h got=%h exp=%h", what, x, y, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      x = 8'(i);
      y = 8'($urandom);
      #1;
      check("map", px, r_to_pair(x));
      check("hom", pxy, rc_mul(px, py));
    end
    // alpha^k in polynomial basis maps to alpha256^k in pair form
    for (int k = 0; k < 255; k++) begin
      x = rs_exp(k);
      #1;
      check("exp", px, rc_exp(k));
    end
    // S8 = alpha^181 -> (C0, C1) = (a^10, a^12); S2 = alpha^74 -> (a^6, a^14)
    x = rs_exp(181); #1; check("S8", px, {r16_exp(12), r16_exp(10)});
    x = rs_exp(74);  #1; check("S2", px, {r16_exp(14), r16_exp(6)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
