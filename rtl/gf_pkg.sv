// gf_pkg: shared types and constants of the divider-free Chien search machine.
//
// GF(2^8) is handled as the composite field GF((2^4)^2): an element C is the
// pair (C1, C0) of GF(2^4) nibbles with C = C0 + beta*C1, beta^2 = beta + gamma.
// The nibble field GF(2^4) uses the polynomial x^4 + x^3 + 1 and gamma is its
// primitive element alpha16 (4'h2).  With this choice the element
// alpha256 = (C1 = 4'hD, C0 = 4'hB) is primitive and has minimal polynomial
// x^8 + x^4 + x^3 + x^2 + 1, the usual Reed-Solomon field polynomial.  The pair
// form, the gamma reduction rule and the use of GF(2^4) units follow the
// document; the concrete polynomials and gamma are not printed there and were
// fixed so that every field value of its worked 4-error example comes out.
//
// The micro-instruction format of the GF(2^4) processor is also defined here;
// it is this design's own encoding.
package gf_pkg;

  typedef logic [3:0] gf16_t;

  typedef struct packed {
    gf16_t c1;   // coefficient of beta
    gf16_t c0;   // constant coefficient
  } gf256_t;

  localparam gf16_t  GAMMA     = 4'h2;                       // alpha16
  localparam gf256_t ALPHA256  = '{c1: 4'hD, c0: 4'hB};      // primitive alpha256
  localparam gf256_t GF256_ONE = '{c1: 4'h0, c0: 4'h1};

  // Routines the processor can run on GF(2^8) operands.
  typedef enum logic [1:0] {
    OP_MUL  = 2'd0,   // y = a * b
    OP_SQR  = 2'd1,   // y = a^2
    OP_POW4 = 2'd2    // y = a^4
  } proc_op_e;

  // Machine-1 unit selected by the 2-bit micro-opcode (E1..E4).
  typedef enum logic [1:0] {
    U_MUL   = 2'd0,   // E1: In0 * In1
    U_ADD   = 2'd1,   // E2: In0 + In1
    U_GAMMA = 2'd2,   // E3: gamma * In0
    U_SQ    = 2'd3    // E4: In0^2
  } unit_e;

  localparam int NREG = 8;
  typedef logic [2:0] reg_idx_t;

  // One micro-instruction: Machine 1 result (Out0) goes to d0 when w0 is set;
  // when e0 is set the X^4 unit squares In1 twice and its result (Out1) goes to d1.
  typedef struct packed {
    logic     last;   // final instruction of a routine
    unit_e    op;     // Machine-1 unit
    logic     w0;     // write Out0 to d0
    logic     e0;     // enable X^4 unit, write Out1 to d1
    reg_idx_t s0;     // register driving In0
    reg_idx_t s1;     // register driving In1
    reg_idx_t d0;
    reg_idx_t d1;
  } instr_t;

  // Register-file roles shared by the micro-program and the processor.
  localparam reg_idx_t R_A0 = 3'd0, R_A1 = 3'd1, R_B0 = 3'd2, R_B1 = 3'd3;
  localparam reg_idx_t R_Y0 = 3'd6, R_Y1 = 3'd7;   // result pair (C0, C1)

  // Micro-program entry addresses of the three routines.
  localparam logic [4:0] MUL_ENTRY = 5'd0, SQR_ENTRY = 5'd8, POW4_ENTRY = 5'd12;

endpackage
