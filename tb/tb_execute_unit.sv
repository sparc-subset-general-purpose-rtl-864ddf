// tb_execute_unit: self-checking test of the execute unit.
//
// Checks that alu_res follows the operands combinationally, that res and
// res_hi load only on en_exe_out, and that the PSR icc field (bits 23:20)
// loads only on en_psr, with expected values computed here for ADD, SUB,
// UMUL and XOR.
`timescale 1ns/1ps
module tb_execute_unit;
  import sparc_pkg::*;
  logic        clk = 0, rst = 1, en_exe_out, en_psr;
  alu_op_t     aluctrl;
  logic [31:0] opr1, opr2, alu_res, res, res_hi, psr;
  logic [3:0]  icc;
  int checks = 0, failures = 0;

  execute_unit dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_t     ops [4] = '{ALU_ADD, ALU_SUB, ALU_UMUL, ALU_XOR};
    logic [31:0] er, eh, pr, ph;
    logic [3:0]  eicc, picc;
    logic [63:0] w;
    logic        e1, e2;
    en_exe_out = 0; en_psr = 0; aluctrl = ALU_NOP; opr1 = 0; opr2 = 0;
    @(posedge clk); #1 rst = 0;
    pr = 0; ph = 0; picc = 0;
    repeat (2000) begin
      @(negedge clk);
      aluctrl = ops[$urandom_range(0, 3)];
      opr1 = $urandom; opr2 = $urandom;
      if ($urandom_range(0, 4) == 0) opr2 = opr1;
      e1 = $urandom_range(0, 1); e2 = $urandom_range(0, 1);
      en_exe_out = e1; en_psr = e2;
      eh = 0;
      case (aluctrl)
        ALU_ADD:  begin w = 64'(opr1) + 64'(opr2); er = w[31:0];
                        eicc = {er[31], er == 0, opr1[31] == opr2[31] && er[31] != opr1[31], w[32]}; end
        ALU_SUB:  begin er = opr1 - opr2;
                        eicc = {er[31], er == 0, opr1[31] != opr2[31] && er[31] != opr1[31], opr1 < opr2}; end
        ALU_UMUL: begin w = 64'(opr1) * 64'(opr2); er = w[31:0]; eh = w[63:32];
                        eicc = {er[31], er == 0, 2'b00}; end
        default:  begin er = opr1 ^ opr2; eicc = {er[31], er == 0, 2'b00}; end
      endcase
      #1 chk(alu_res == er, "combinational ALU result");
      @(negedge clk);
      en_exe_out = 0; en_psr = 0;
      if (e1) begin pr = er; ph = eh; end
      if (e2) picc = eicc;
      chk(res == pr && res_hi == ph, "result register");
      chk(psr == {8'h0, picc, 20'h0} && icc == picc, "PSR icc");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
