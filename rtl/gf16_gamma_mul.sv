// gf16_gamma_mul: multiply a GF(2^4) nibble by the constant gamma^POWER.
//
// gamma is alpha16, so one step is a left shift with reduction by
// x^4 + x^3 + 1: {a2, a1, a0, 0} plus (a3 ? 4'b1001 : 0).  POWER steps are
// chained; POWER = 1 is the gamma multiplier and POWER = 2 the gamma^2
// multiplier used in the GF(2^8) fourth-power circuit.  Combinational.
module gf16_gamma_mul
  import gf_pkg::*;
#(
  parameter int unsigned POWER = 1
) (
  input  gf16_t a,
  output gf16_t y
);
  gf16_t stage [POWER+1];

  always_comb begin
    stage[0] = a;
    for (int unsigned i = 0; i < POWER; i++) begin
      stage[i+1] = {stage[i][2:0], 1'b0} ^ (stage[i][3] ? 4'b1001 : 4'b0000);
    end
    y = stage[POWER];
  end
endmodule
