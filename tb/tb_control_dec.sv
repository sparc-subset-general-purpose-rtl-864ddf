// tb_control_dec: self-checking test of the control decoder.
//
// For every state and a set of instructions (ADD, ADDcc, SUB, UMUL, logic
// ops, shifts, LD, ST, CALL, Bicc and an unsupported encoding, each with
// i = 0 and i = 1) it compares the whole control vector with one built
// here from the control-signal table: the T0 and T4 columns, en_rs2 = not i
// in T1, the memory signals of loads and stores, en_psr for cc forms and
// the ALU code of each instruction (ADD = 11001).
`timescale 1ns/1ps
module tb_control_dec;
  import sparc_pkg::*;
  state_t     state;
  logic [1:0] op;
  logic [2:0] op2;
  logic [5:0] op3;
  logic       i;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  control_dec dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    string      name;
    logic [1:0] op;
    logic [5:0] op3;
    logic [4:0] alu;
    bit         wr, cc, ld, st, y;
  } instr_t;

  initial begin
    instr_t tab [] = '{
      '{"ADD",   2'b10, 6'h00, 5'b11001, 1, 0, 0, 0, 0},
      '{"ADDcc", 2'b10, 6'h10, 5'b11001, 1, 1, 0, 0, 0},
      '{"SUB",   2'b10, 6'h04, 5'b11010, 1, 0, 0, 0, 0},
      '{"SUBcc", 2'b10, 6'h14, 5'b11010, 1, 1, 0, 0, 0},
      '{"UMUL",  2'b10, 6'h0A, 5'b11011, 1, 0, 0, 0, 1},
      '{"UMULcc",2'b10, 6'h1A, 5'b11011, 1, 1, 0, 0, 1},
      '{"AND",   2'b10, 6'h01, 5'b10001, 1, 0, 0, 0, 0},
      '{"ANDN",  2'b10, 6'h05, 5'b10010, 1, 0, 0, 0, 0},
      '{"OR",    2'b10, 6'h02, 5'b10011, 1, 0, 0, 0, 0},
      '{"ORN",   2'b10, 6'h06, 5'b10100, 1, 0, 0, 0, 0},
      '{"XOR",   2'b10, 6'h03, 5'b10101, 1, 0, 0, 0, 0},
      '{"XNORcc",2'b10, 6'h17, 5'b10110, 1, 1, 0, 0, 0},
      '{"SLL",   2'b10, 6'h25, 5'b01001, 1, 0, 0, 0, 0},
      '{"SRL",   2'b10, 6'h26, 5'b01010, 1, 0, 0, 0, 0},
      '{"SRA",   2'b10, 6'h27, 5'b01011, 1, 0, 0, 0, 0},
      '{"LD",    2'b11, 6'h00, 5'b11001, 1, 0, 1, 0, 0},
      '{"ST",    2'b11, 6'h04, 5'b11001, 0, 0, 0, 1, 0},
      '{"CALL",  2'b01, 6'h15, 5'b00000, 0, 0, 0, 0, 0},
      '{"BICC",  2'b00, 6'h13, 5'b00000, 0, 0, 0, 0, 0},
      '{"JMPL",  2'b10, 6'h38, 5'b00000, 0, 0, 0, 0, 0}
    };
    state_t sts [6] = '{S_IDLE, S_FETCH, S_DECODE, S_EXECUTE, S_MEMORY, S_WB};
    ctrl_t  e;
    foreach (tab[t]) foreach (sts[s]) for (int ii = 0; ii < 2; ii++) begin
      state = sts[s]; op = tab[t].op; op3 = tab[t].op3; op2 = op3[5:3]; i = ii[0];
      e = '0;
      case (state)
        S_FETCH:   begin e.en_npc = 1; e.en_ir = 1; e.en_rom = 1; end
        S_DECODE:  begin e.en_dec = 1; e.en_rd = 1; e.en_rs1 = 1; e.en_rs2 = !i;
                         e.en_mdr2 = tab[t].st; end
        S_EXECUTE: begin e.en_exe_out = 1; e.aluctrl = alu_op_t'(tab[t].alu);
                         e.en_mar = tab[t].ld | tab[t].st; e.en_psr = tab[t].cc; end
        S_MEMORY:  begin e.en_ram = tab[t].ld | tab[t].st; e.en_mdr = tab[t].ld;
                         e.wr_ram = tab[t].st; end
        S_WB:      begin e.en_pc = 1; e.en_wb = 1; e.en_wrt = tab[t].wr;
                         e.sel_mdr = tab[t].ld; e.wr_y = tab[t].y; end
        default:   e = '0;
      endcase
      #1;
      checks++;
      if (ctrl !== e) begin
        failures++;
        if (failures < 10) $display("FAIL %s in %s: got %b want %b", tab[t].name, state.name(), ctrl, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
