// gf16_processor: micro-programmed GF(2^4) processor that performs GF(2^8)
// multiply, square and fourth power without a GF(2^8) multiplier or divider.
//
// Structure: an 8-entry register file of nibbles drives the operand buses
// In0 and In1; the instruction register, loaded from the micro-program ROM,
// feeds the 2-bit instruction decoder whose enables E1..E4 pick one unit of
// Machine 1 (MUL, ADD, gamma, X^2) to drive Out0; the E0 bit of the same
// instruction enables the GF(2^4) X^4 unit, which reads In1 and drives Out1.
// Out0 and Out1 are written back to the register file in the same cycle, so
// one Machine-1 operation and one X^4 operation run in parallel.
//
// Interface: in IDLE, a start pulse latches the operand pairs a -> (R1,R0),
// b -> (R3,R2) and the routine op.  The next cycle fetches the first
// micro-instruction; each following cycle executes one instruction and
// fetches the next.  One cycle after the routine's last instruction, done is
// high for one cycle and y = (R7,R6) holds the result until the next start.
// Start-to-done latency: MUL 10, SQR 6, POW4 7 cycles.  start is ignored
// while busy.
//
// The units, buses, micro-program, instruction register, decoder and X^4
// unit follow the document's processor drawing; the register file, the bus
// assignment of the X^4 unit and the timing are this design's choices.
module gf16_processor
  import gf_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  proc_op_e op,
  input  gf256_t   a,
  input  gf256_t   b,
  output logic     busy,
  output logic     done,
  output gf256_t   y
);
  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_EXEC} state_e;

  state_e     state;
  logic [4:0] upc;
  instr_t     ir, rom_word;
  gf16_t      rf [NREG];
  gf16_t      in0, in1, out0, out1, x4;
  logic [3:0] en;

  gf16_uprog_rom #(.DEPTH(32)) u_rom (.addr(upc), .data(rom_word));
  gf16_idecoder                u_dec (.op(ir.op), .en(en));
  gf16_machine1                u_m1  (.in0(in0), .in1(in1), .en(en), .out0(out0));
  gf16_pow4                    u_x4  (.a(in1), .y(x4));

  always_comb begin
    in0  = rf[ir.s0];
    in1  = rf[ir.s1];
    out1 = ir.e0 ? x4 : 4'h0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      upc   <= '0;
      ir    <= '0;
      done  <= 1'b0;
      for (int i = 0; i < NREG; i++) rf[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            rf[R_A0] <= a.c0;
            rf[R_A1] <= a.c1;
            rf[R_B0] <= b.c0;
            rf[R_B1] <= b.c1;
            unique case (op)
              OP_SQR:  upc <= SQR_ENTRY;
              OP_POW4: upc <= POW4_ENTRY;
              default: upc <= MUL_ENTRY;
            endcase
            state <= S_FETCH;
          end
        end
        S_FETCH: begin
          ir    <= rom_word;
          upc   <= upc + 5'd1;
          state <= S_EXEC;
        end
        S_EXEC: begin
          if (ir.w0) rf[ir.d0] <= out0;
          if (ir.e0) rf[ir.d1] <= out1;
          if (ir.last) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            ir  <= rom_word;
            upc <= upc + 5'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign y    = '{c1: rf[R_Y1], c0: rf[R_Y0]};

  // Both result buses may not target the same register in one instruction.
  a_no_dual_write: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_EXEC && ir.w0 && ir.e0) |-> (ir.d0 != ir.d1));
endmodule
