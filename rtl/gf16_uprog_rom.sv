// gf16_uprog_rom: micro-program store of the GF(2^4) processor.
//
// Holds three routines that perform one GF(2^8) operation on the pair
// (A1, A0) in registers R1/R0 and (B1, B0) in R3/R2, leaving the result pair
// (Y1, Y0) in R7/R6:
//   addr  0..7   MUL : A1B1, A0B0, A0+A1, B0+B1, (A0+A1)(B0+B1),
//                      C1 = that + A0B0, gamma*A1B1, C0 = A0B0 + gamma*A1B1
//   addr  8..11  SQR : A0^2, D1 = A1^2, gamma*A1^2, D0 = A0^2 + gamma*A1^2
//   addr 12..16  POW4: E1 = A1^4 (X^4 unit), then A0^4 on the X^4 unit in
//                      parallel with gamma*A1^4 on Machine 1, gamma^2*A1^4,
//                      A0^4 + gamma^2*A1^4, E0 = that + gamma*A1^4
// The micro-operation sequences are the document's; the instruction
// encoding, register allocation and addresses are this design's.  The read
// is combinational; unused words hold a no-write instruction.
module gf16_uprog_rom
  import gf_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output instr_t                   data
);

  function automatic instr_t mk(logic f_last, unit_e f_op, logic f_w0, logic f_e0,
                                reg_idx_t f_s0, reg_idx_t f_s1, reg_idx_t f_d0, reg_idx_t f_d1);
    return '{last: f_last, op: f_op, w0: f_w0, e0: f_e0, s0: f_s0, s1: f_s1, d0: f_d0, d1: f_d1};
  endfunction

  function automatic instr_t word(int unsigned wa);
    case (wa)
      // MUL
      0:  return mk(0, U_MUL,   1, 0, 3'd1, 3'd3, 3'd4, 3'd0);  // R4 = A1*B1
      1:  return mk(0, U_MUL,   1, 0, 3'd0, 3'd2, 3'd5, 3'd0);  // R5 = A0*B0
      2:  return mk(0, U_ADD,   1, 0, 3'd0, 3'd1, 3'd6, 3'd0);  // R6 = A0+A1
      3:  return mk(0, U_ADD,   1, 0, 3'd2, 3'd3, 3'd7, 3'd0);  // R7 = B0+B1
      4:  return mk(0, U_MUL,   1, 0, 3'd6, 3'd7, 3'd6, 3'd0);  // R6 = (A0+A1)(B0+B1)
      5:  return mk(0, U_ADD,   1, 0, 3'd6, 3'd5, 3'd7, 3'd0);  // R7 = C1
      6:  return mk(0, U_GAMMA, 1, 0, 3'd4, 3'd0, 3'd4, 3'd0);  // R4 = gamma*A1B1
      7:  return mk(1, U_ADD,   1, 0, 3'd5, 3'd4, 3'd6, 3'd0);  // R6 = C0
      // SQR
      8:  return mk(0, U_SQ,    1, 0, 3'd0, 3'd0, 3'd4, 3'd0);  // R4 = A0^2
      9:  return mk(0, U_SQ,    1, 0, 3'd1, 3'd0, 3'd7, 3'd0);  // R7 = D1 = A1^2
      10: return mk(0, U_GAMMA, 1, 0, 3'd7, 3'd0, 3'd5, 3'd0);  // R5 = gamma*A1^2
      11: return mk(1, U_ADD,   1, 0, 3'd4, 3'd5, 3'd6, 3'd0);  // R6 = D0
      // POW4
      12: return mk(0, U_MUL,   0, 1, 3'd0, 3'd1, 3'd0, 3'd7);  // R7 = E1 = A1^4
      13: return mk(0, U_GAMMA, 1, 1, 3'd7, 3'd0, 3'd5, 3'd4);  // R5 = gamma*A1^4 || R4 = A0^4
      14: return mk(0, U_GAMMA, 1, 0, 3'd5, 3'd0, 3'd6, 3'd0);  // R6 = gamma^2*A1^4
      15: return mk(0, U_ADD,   1, 0, 3'd4, 3'd6, 3'd6, 3'd0);  // R6 = A0^4 + gamma^2*A1^4
      16: return mk(1, U_ADD,   1, 0, 3'd6, 3'd5, 3'd6, 3'd0);  // R6 = E0
      default: return mk(0, U_MUL, 0, 0, 3'd0, 3'd0, 3'd0, 3'd0);
    endcase
  endfunction

  always_comb data = word(int'(addr));
endmodule
