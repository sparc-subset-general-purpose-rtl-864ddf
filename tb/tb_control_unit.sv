// tb_control_unit: self-checking test of the control unit (FSM + decoder).
//
// Starts the unit with en and, for an ADD with i = 0 held in the
// instruction inputs, compares the control signals of each of the five
// steps with the corresponding column of the control-signal table (T0:
// en_npc en_ir en_rom; T1: en_dec en_rd en_rs1 en_rs2; T2: en_exe_out with
// aluctrl 11001; T3: none; T4: en_pc en_wb en_wrt), over several
// instructions, and checks the return to Idle on rst.
`timescale 1ns/1ps
module tb_control_unit;
  import sparc_pkg::*;
  logic       clk = 0, rst = 1, en = 0;
  logic [1:0] op = 2'b10;
  logic [2:0] op2;
  logic [5:0] op3 = 6'h00;
  logic       i = 0;
  state_t     state;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  assign op2 = op3[5:3];
  control_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl_t col [5];
    col[0] = '0; col[0].en_npc = 1; col[0].en_ir = 1; col[0].en_rom = 1;
    col[1] = '0; col[1].en_dec = 1; col[1].en_rd = 1; col[1].en_rs1 = 1; col[1].en_rs2 = 1;
    col[2] = '0; col[2].en_exe_out = 1; col[2].aluctrl = alu_op_t'(5'b11001);
    col[3] = '0;
    col[4] = '0; col[4].en_pc = 1; col[4].en_wb = 1; col[4].en_wrt = 1;
    @(negedge clk); rst = 0;
    checks++; if (ctrl !== '0 || state != S_IDLE) failures++;
    en = 1;
    @(negedge clk);
    for (int c = 0; c < 25; c++) begin
      checks++;
      if (ctrl !== col[c % 5]) begin
        failures++;
        if (failures < 10) $display("FAIL step T%0d: got %b want %b", c % 5, ctrl, col[c % 5]);
      end
      @(negedge clk);
    end
    rst = 1; @(negedge clk); rst = 0; en = 0;
    checks++; if (state != S_IDLE || ctrl !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
