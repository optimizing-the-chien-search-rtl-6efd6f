// tb_gf256_units: exhaustive check of the composite-field GF(2^8) multiplier,
// squarer and fourth-power circuit against the reference pair arithmetic,
// plus the field values of the 4-error worked example (alpha^39 = (a^2, a^8)
// style pairs) to confirm the field representation.
module tb_gf256_units;
  import gf_pkg::*;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;
  gf256_t a, b, c, d, e;

  gf256_mul  u_mul (.a(a), .b(b), .c(c));
  gf256_sq   u_sq  (.a(a), .d(d));
  gf256_pow4 u_p4  (.a(a), .e(e));

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h got=%h exp=%h", what, a, b, got, exp);
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
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        check("mul", c, rc_mul(a, b));
      end
      check("sq",   d, rc_mul(a, a));
      check("pow4", e, rc_pow(a, 4));
    end
    // Pair forms printed for the example: alpha^k -> (C0, C1) as alpha16 powers.
    check("a^254", rc_exp(254), {r16_exp(13), r16_exp(0)});
    check("a^138", rc_exp(138), {r16_exp(6),  r16_exp(1)});
    check("a^109", rc_exp(109), {r16_exp(3),  4'h0});
    check("a^39",  rc_exp(39),  {r16_exp(2),  r16_exp(8)});
    // alpha^2 through the squarer and alpha^4 through the fourth-power unit
    a = 8'hDB; b = 8'hDB; #1;
    check("alpha^2", d, rc_exp(2));
    check("alpha^4", e, rc_exp(4));
    check("alpha^2 mul", c, rc_exp(2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
