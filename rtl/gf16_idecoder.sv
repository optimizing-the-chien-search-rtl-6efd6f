// gf16_idecoder: the processor's 2-bit instruction decoder.
//
// Turns the Machine-1 opcode of the instruction register into the one-hot
// unit enables E1..E4 (en[0] = E1 MUL, en[1] = E2 ADD, en[2] = E3 gamma,
// en[3] = E4 X^2).  The document shows a 2-bit decoder with outputs E1..E4;
// the code assignment is this design's.  Combinational.
module gf16_idecoder
  import gf_pkg::*;
(
  input  unit_e      op,
  output logic [3:0] en
);
  always_comb begin
    en = 4'b0000;
    unique case (op)
      U_MUL:   en[0] = 1'b1;
      U_ADD:   en[1] = 1'b1;
      U_GAMMA: en[2] = 1'b1;
      U_SQ:    en[3] = 1'b1;
    endcase
  end
endmodule
