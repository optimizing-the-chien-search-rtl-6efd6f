// tb_gf16_processor: runs the three micro-programmed GF(2^8) routines (MUL,
// SQR, POW4) on random and edge operands and compares the result pair with
// the reference arithmetic.  Also checks the start-to-done latency
// (MUL 10, SQR 6, POW4 7 cycles), the one-cycle done pulse and busy.
module tb_gf16_processor;
  import gf_pkg::*;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;
  logic     clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  proc_op_e op;
  gf256_t   a, b, y;
  logic     busy, done;

  gf16_processor dut (.clk, .rst_n, .start, .op, .a, .b, .busy, .done, .y);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h got=%h exp=%h", what, a, b, got, exp);
    end
  endtask

  task automatic run(proc_op_e o, logic [7:0] va, logic [7:0] vb);
    int cyc;
    logic [7:0] exp;
    @(negedge clk);
    op = o; a = va; b = vb; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    check("busy", 32'(busy), 1);
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    unique case (o)
      OP_MUL:  exp = rc_mul(va, vb);
      OP_SQR:  exp = rc_mul(va, va);
      default: exp = rc_pow(va, 4);
    endcase
    check("result", 32'(y), 32'(exp));
    check("latency", cyc, (o == OP_MUL) ? 10 : (o == OP_SQR) ? 6 : 7);
    @(negedge clk);
    check("done pulse", 32'(done), 0);
    check("hold", 32'(y), 32'(exp));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = OP_MUL; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(OP_MUL, 8'h00, 8'h5A);
    run(OP_MUL, 8'hFF, 8'hFF);
    run(OP_MUL, 8'hDB, 8'h01);
    run(OP_POW4, 8'hDB, 8'h00);
    for (int i = 0; i < 600; i++) run(proc_op_e'(i % 3), 8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
