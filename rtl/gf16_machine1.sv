// gf16_machine1: the GF(2^4) execution units of the processor and their
// output interface ("Machine 1").
//
// Four units sit on the operand buses In0 and In1: a multiplier (E1,
// In0*In1), an adder (E2, In0+In1), a gamma multiplier (E3, gamma*In0) and a
// squarer (E4, In0^2).  All four compute every cycle; the interface passes the
// result of the one unit whose enable is set onto the result bus Out0
// (AND-OR selection, zero when no enable is set).  Combinational.  The set of
// units and the enables come from the document; that the unary units read
// In0 and that Machine 1 drives only Out0 are this design's choices.
module gf16_machine1
  import gf_pkg::*;
(
  input  gf16_t      in0,
  input  gf16_t      in1,
  input  logic [3:0] en,    // E1..E4, one-hot or zero
  output gf16_t      out0
);
  gf16_t r_mul, r_add, r_gam, r_sq;

  gf16_mul                    u_mul (.x(in0), .y(in1), .z(r_mul));
  gf16_add                    u_add (.a(in0), .b(in1), .y(r_add));
  gf16_gamma_mul #(.POWER(1)) u_gam (.a(in0), .y(r_gam));
  gf16_sq                     u_sq  (.a(in0), .y(r_sq));

  always_comb begin
    out0 = ({4{en[0]}} & r_mul) | ({4{en[1]}} & r_add)
         | ({4{en[2]}} & r_gam) | ({4{en[3]}} & r_sq);
  end
endmodule
