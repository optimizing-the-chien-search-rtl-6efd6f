// tb_gf16_units: exhaustive check of the GF(2^4) building blocks (multiplier,
// squarer, fourth-power circuit, gamma and gamma^2 multipliers, adder)
// against the reference arithmetic of gf_ref_pkg.  Purely combinational DUTs;
// every input combination is applied once.
module tb_gf16_units;
  import gf_pkg::*;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;
  gf16_t x, y, z_mul, z_sq, z_p4, z_g1, z_g2, z_add;

  gf16_mul                    u_mul (.x(x), .y(y), .z(z_mul));
  gf16_sq                     u_sq  (.a(x), .y(z_sq));
  gf16_pow4                   u_p4  (.a(x), .y(z_p4));
  gf16_gamma_mul #(.POWER(1)) u_g1  (.a(x), .y(z_g1));
  gf16_gamma_mul #(.POWER(2)) u_g2  (.a(x), .y(z_g2));
  gf16_add                    u_add (.a(x), .b(y), .y(z_add));

  task automatic check(string what, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%h y=%h got=%h exp=%h", what, x, y, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        x = 4'(i);
        y = 4'(j);
        #1;
        check("mul", z_mul, r16_mul(x, y));
        check("add", z_add, x ^ y);
      end
      check("sq",     z_sq, r16_mul(x, x));
      check("pow4",   z_p4, r16_pow(x, 4));
      check("gamma",  z_g1, r16_mul(x, 4'h2));
      check("gamma2", z_g2, r16_mul(x, 4'h4));
    end
    // z0 cone of the multiplier as drawn: x0y0 ^ x3y1 ^ (x2^x3)y2 ^ (x1^x2^x3)y3
    x = 4'hB; y = 4'h7; #1;
    check("z0", {3'b0, z_mul[0]},
          {3'b0, (x[0]&y[0]) ^ (x[3]&y[1]) ^ ((x[2]^x[3])&y[2]) ^ ((x[1]^x[2]^x[3])&y[3])});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
