// control_dec: the decoder (DEC) of the control unit.
//
// Combinational. From the FSM state and the instruction fields op, op2, op3
// and i it produces the control signals of one step:
//   T0 Fetch    en_npc, en_ir, en_rom
//   T1 Decode   en_dec, en_rd, en_rs1, en_rs2 (only when i = 0),
//               en_mdr2 (store)
//   T2 Execute  en_exe_out, aluctrl, en_mar (load/store),
//               en_psr (the ...cc forms)
//   T3 Memory   en_ram, en_mdr (load), wr_ram (store)
//   T4 WB       en_pc, en_wb, en_wrt (ALU ops and loads), sel_mdr (load),
//               wr_y (UMUL/UMULcc)
// Supported: ADD SUB UMUL AND ANDN OR ORN XOR XNOR and their cc forms, SLL
// SRL SRA, LD, ST, CALL and Bicc. Any other encoding (SETHI included)
// executes as a no-operation that only advances the PC. op2 is an input as
// in the design's control-unit diagram, but no signal depends on it: a
// Bicc needs nothing beyond the common T0..T4 enables, and its decision is
// made in the decode unit. Idle drives
// everything low. The per-step assignments follow the design's control
// signal table and register-transfer description; the signals en_ram,
// sel_mdr and wr_y, the ALU codes other than ADD and the treatment of
// unsupported encodings are this implementation's.
module control_dec
  import sparc_pkg::*;
(
  input  state_t     state,
  input  logic [1:0] op,
  input  logic [2:0] op2,
  input  logic [5:0] op3,
  input  logic       i,
  output ctrl_t      ctrl
);
  logic    is_alu, is_cc, is_ld, is_st, is_umul;
  alu_op_t alu_sel;

  // Arithmetic / logic / shift decode (op = 10). For op3<5> = 0 the cc
  // forms differ from the plain ones only in op3<4>.
  logic [5:0] base;
  assign base = op3[5] ? op3 : (op3 & ~OP3_CC);

  always_comb begin
    is_alu  = 1'b0;
    is_cc   = 1'b0;
    alu_sel = ALU_NOP;
    if (op == OP_ALU) begin
      is_alu = 1'b1;
      is_cc  = op3[4] && !op3[5];
      unique case (base)
        OP3_ADD:  alu_sel = ALU_ADD;
        OP3_AND:  alu_sel = ALU_AND;
        OP3_OR:   alu_sel = ALU_OR;
        OP3_XOR:  alu_sel = ALU_XOR;
        OP3_SUB:  alu_sel = ALU_SUB;
        OP3_ANDN: alu_sel = ALU_ANDN;
        OP3_ORN:  alu_sel = ALU_ORN;
        OP3_XNOR: alu_sel = ALU_XNOR;
        OP3_UMUL: alu_sel = ALU_UMUL;
        OP3_SLL:  alu_sel = ALU_SLL;
        OP3_SRL:  alu_sel = ALU_SRL;
        OP3_SRA:  alu_sel = ALU_SRA;
        default: begin
          is_alu = 1'b0;
          is_cc  = 1'b0;
        end
      endcase
    end
  end

  assign is_ld   = (op == OP_MEM) && (op3 == OP3_LD);
  assign is_st   = (op == OP_MEM) && (op3 == OP3_ST);
  assign is_umul = is_alu && (alu_sel == ALU_UMUL);

  always_comb begin
    ctrl = '0;
    unique case (state)
      S_FETCH: begin
        ctrl.en_npc = 1'b1;
        ctrl.en_ir  = 1'b1;
        ctrl.en_rom = 1'b1;
      end
      S_DECODE: begin
        ctrl.en_dec  = 1'b1;
        ctrl.en_rd   = 1'b1;
        ctrl.en_rs1  = 1'b1;
        ctrl.en_rs2  = !i;
        ctrl.en_mdr2 = is_st;
      end
      S_EXECUTE: begin
        ctrl.en_exe_out = 1'b1;
        ctrl.aluctrl    = (is_ld || is_st) ? ALU_ADD : alu_sel;
        ctrl.en_mar     = is_ld || is_st;
        ctrl.en_psr     = is_cc;
      end
      S_MEMORY: begin
        ctrl.en_ram = is_ld || is_st;
        ctrl.en_mdr = is_ld;
        ctrl.wr_ram = is_st;
      end
      S_WB: begin
        ctrl.en_pc   = 1'b1;
        ctrl.en_wb   = 1'b1;
        ctrl.en_wrt  = is_alu || is_ld;
        ctrl.sel_mdr = is_ld;
        ctrl.wr_y    = is_umul;
      end
      default: ctrl = '0;
    endcase
  end
endmodule
