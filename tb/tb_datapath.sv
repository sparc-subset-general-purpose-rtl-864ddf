// tb_datapath: self-checking test of the datapath without the control unit.
//
// The testbench plays the control unit: for each instruction of a short
// program it drives the control vector of each step T0..T4 (built here from
// the control-signal table for the instruction's class) and serves the ROM
// and RAM ports from arrays. Program: ADD r1,r0,5; ST r1,[r0+4];
// LD r2,[r0+4]; SUBcc r3,r2,r1; BE +2; (skipped ADD); UMUL r4,r1,r1;
// CALL -6. Registers, Y, icc, RAM and the PC after each instruction are
// compared with hand-computed values, and after each step the register it
// loads (IR and nPC, the operands, MAR, MDR) is checked.
`timescale 1ns/1ps
module tb_datapath;
  import sparc_pkg::*;
  import sparc_tb_pkg::*;
  logic        clk = 0, rst = 1;
  ctrl_t       ctrl;
  logic [1:0]  op;
  logic [2:0]  op2;
  logic [5:0]  op3;
  logic        i, rom_en, ram_en, ram_we;
  logic [31:0] rom_addr, rom_data, ram_addr, ram_wdata, ram_rdata, pc, ir, psr, y;
  logic [31:0] rom [8];
  logic [31:0] ram [8];
  int checks = 0, failures = 0;

  datapath dut (.*);
  always #5 clk = ~clk;
  assign rom_data  = rom_en ? rom[rom_addr[4:2]] : 32'h0;
  assign ram_rdata = ram_en ? ram[ram_addr[4:2]] : 32'h0;
  always_ff @(posedge clk) if (ram_en && ram_we) ram[ram_addr[4:2]] <= ram_wdata;

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

  function automatic logic [31:0] R(int k);
    return dut.u_regfile.r[k];
  endfunction

  typedef enum {C_ALU, C_ALUCC, C_MUL, C_LD, C_ST, C_XFER} cls_t;

  // one instruction: five steps
  task automatic run(input cls_t c, input alu_op_t a, input bit imm);
    for (int s = 0; s < 5; s++) begin
      ctrl = '0;
      case (s)
        0: begin ctrl.en_npc = 1; ctrl.en_ir = 1; ctrl.en_rom = 1; end
        1: begin ctrl.en_dec = 1; ctrl.en_rd = 1; ctrl.en_rs1 = 1; ctrl.en_rs2 = !imm;
                 ctrl.en_mdr2 = (c == C_ST); end
        2: begin ctrl.en_exe_out = 1; ctrl.aluctrl = a; ctrl.en_mar = (c == C_LD || c == C_ST);
                 ctrl.en_psr = (c == C_ALUCC); end
        3: begin ctrl.en_ram = (c == C_LD || c == C_ST); ctrl.en_mdr = (c == C_LD);
                 ctrl.wr_ram = (c == C_ST); end
        default: begin ctrl.en_pc = 1; ctrl.en_wb = 1; ctrl.en_wrt = (c != C_ST && c != C_XFER);
                 ctrl.sel_mdr = (c == C_LD); ctrl.wr_y = (c == C_MUL); end
      endcase
      @(negedge clk);
      // what each step must have loaded
      case (s)
        0: chk(dut.ir == rom[dut.pc[4:2]] && dut.npc == dut.pc + 4, "T0: IR and nPC");
        1: chk(dut.opr1 == (dut.rs1 == 0 ? 0 : R(int'(dut.rs1))) &&
               dut.opr2 == (dut.ir[13] ? 32'($signed(dut.ir[12:0])) :
                             (imm || dut.rs2 == 0) ? 0 : R(int'(dut.rs2))),
               "T1: operands");
        2: if (c == C_LD || c == C_ST) chk(ram_addr == dut.opr1 + dut.opr2, "T2: MAR");
        3: if (c == C_LD) chk(dut.u_mem.mdr == ram[ram_addr[4:2]], "T3: MDR");
        default: ;
      endcase
    end
    ctrl = '0;
  endtask

  initial begin
    rom[0] = enc_f3(2'b10, 5'd1, 6'h00, 5'd0, 1, 13'd5);   // add   r1, r0, 5
    rom[1] = enc_f3(2'b11, 5'd1, 6'h04, 5'd0, 1, 13'd4);   // st    r1, [r0+4]
    rom[2] = enc_f3(2'b11, 5'd2, 6'h00, 5'd0, 1, 13'd4);   // ld    r2, [r0+4]
    rom[3] = enc_f3(2'b10, 5'd3, 6'h14, 5'd2, 0, 13'd1);   // subcc r3, r2, r1
    rom[4] = enc_bicc(4'h1, 22'd2);                        // be    +2
    rom[5] = enc_f3(2'b10, 5'd9, 6'h00, 5'd0, 1, 13'd9);   // (skipped)
    rom[6] = enc_f3(2'b10, 5'd4, 6'h0A, 5'd1, 0, 13'd1);   // umul  r4, r1, r1
    rom[7] = enc_call(30'h3FFFFFFA);                       // call  -6
    foreach (ram[k]) ram[k] = 32'hAAAA0000 + 32'(k);
    ctrl = '0;
    @(negedge clk); rst = 0;
    run(C_ALU, ALU_ADD, 1);
    chk(R(1) == 5 && pc == 4, "add");
    chk(op == 2'b10 && op3 == 6'h00 && i == 1, "fields to the control unit");
    run(C_ST, ALU_ADD, 1);
    chk(ram[1] == 5 && pc == 8, "st");
    run(C_LD, ALU_ADD, 1);
    chk(R(2) == 5 && pc == 12, "ld");
    run(C_ALUCC, ALU_SUB, 0);
    chk(R(3) == 0 && psr[23:20] == 4'b0100 && pc == 16, "subcc sets z");
    run(C_XFER, ALU_NOP, 0);
    chk(pc == 24, "be taken");
    chk(R(9) == 0, "no register written by a branch");
    run(C_MUL, ALU_UMUL, 0);
    chk(R(4) == 25 && y == 0 && pc == 28, "umul");
    run(C_XFER, ALU_NOP, 0);
    chk(pc == 4, "call backwards");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
