// tb_gf16_machine1: drives the 2-bit instruction decoder into Machine 1 for
// every opcode and every bus value pair and checks that exactly the selected
// unit's result appears on Out0 (MUL, ADD, gamma, X^2), and that Out0 is
// zero with no enable.
module tb_gf16_machine1;
  import gf_pkg::*;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;
  unit_e      op;
  logic [3:0] en, en_sel;
  gf16_t      in0, in1, out0, exp;

  gf16_idecoder u_dec (.op(op), .en(en));
  gf16_machine1 u_m1  (.in0(in0), .in1(in1), .en(en_sel), .out0(out0));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 4; o++) begin
      op = unit_e'(o);
      #1;
      en_sel = en;   // decoder output drives the unit enables
      for (int i = 0; i < 256; i++) begin
        in0 = 4'(i);
        in1 = 4'(i / 16);
        #1;
        unique case (op)
          U_MUL:   exp = r16_mul(in0, in1);
          U_ADD:   exp = in0 ^ in1;
          U_GAMMA: exp = r16_mul(in0, 4'h2);
          default: exp = r16_mul(in0, in0);
        endcase
        checks++;
        if (out0 !== exp || en !== (4'b0001 << o)) begin
          failures++;
          if (failures < 10) $display("FAIL op=%0d in0=%h in1=%h out=%h exp=%h en=%b sel=%b", o, in0, in1, out0, exp, en, en_sel);
        end
      end
    end
    en_sel = 4'b0000; in0 = 4'h7; in1 = 4'h9; #1;
    checks++;
    if (out0 !== 4'h0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
