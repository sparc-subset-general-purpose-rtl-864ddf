// sparc_pkg: types and constants shared by the SPARC-subset processor.
//
// Holds the SPARC V8 instruction-field encodings used by the subset (op, op2,
// op3, branch conditions), the control-FSM state type, the 5-bit ALU control
// codes and the bundle of control signals the control unit sends to the
// datapath. The op/op2/op3/cond values are the standard SPARC V8 encodings.
// The control-signal names follow the control-signal table of the design
// (en_pc ... en_wrt); en_ram, sel_mdr and wr_y are additions of this
// implementation. Of the ALU codes only ADD = 5'b11001 (the value shown for
// an ADD in the Execute step) and the idle value 5'b00000 are given; the other
// codes are this implementation's choice.
package sparc_pkg;

  // op field, IR<31:30>
  localparam logic [1:0] OP_FMT2 = 2'b00;  // Bicc, SETHI
  localparam logic [1:0] OP_CALL = 2'b01;
  localparam logic [1:0] OP_ALU  = 2'b10;  // arithmetic / logic / shift
  localparam logic [1:0] OP_MEM  = 2'b11;  // load / store

  // op2 field (format 2), IR<24:22>
  localparam logic [2:0] OP2_BICC  = 3'b010;

  // op3 field (format 3, op = 10), IR<24:19>
  localparam logic [5:0] OP3_ADD  = 6'h00;
  localparam logic [5:0] OP3_AND  = 6'h01;
  localparam logic [5:0] OP3_OR   = 6'h02;
  localparam logic [5:0] OP3_XOR  = 6'h03;
  localparam logic [5:0] OP3_SUB  = 6'h04;
  localparam logic [5:0] OP3_ANDN = 6'h05;
  localparam logic [5:0] OP3_ORN  = 6'h06;
  localparam logic [5:0] OP3_XNOR = 6'h07;
  localparam logic [5:0] OP3_UMUL = 6'h0A;
  localparam logic [5:0] OP3_CC   = 6'h10;  // OR-ed in for the ...cc forms
  localparam logic [5:0] OP3_SLL  = 6'h25;
  localparam logic [5:0] OP3_SRL  = 6'h26;
  localparam logic [5:0] OP3_SRA  = 6'h27;

  // op3 field (format 3, op = 11)
  localparam logic [5:0] OP3_LD = 6'h00;
  localparam logic [5:0] OP3_ST = 6'h04;

  // Bicc conditions of the subset, IR<28:25>
  localparam logic [3:0] COND_BN   = 4'h0;  // never
  localparam logic [3:0] COND_BE   = 4'h1;  // z
  localparam logic [3:0] COND_BCS  = 4'h5;  // c
  localparam logic [3:0] COND_BNEG = 4'h6;  // n
  localparam logic [3:0] COND_BVS  = 4'h7;  // v

  // Control FSM states: Idle, then T0..T4
  typedef enum logic [2:0] {
    S_IDLE    = 3'd0,
    S_FETCH   = 3'd1,  // T0
    S_DECODE  = 3'd2,  // T1
    S_EXECUTE = 3'd3,  // T2
    S_MEMORY  = 3'd4,  // T3
    S_WB      = 3'd5   // T4
  } state_t;

  // ALU control codes (aluctrl, 5 bits)
  typedef enum logic [4:0] {
    ALU_NOP  = 5'b00000,
    ALU_ADD  = 5'b11001,
    ALU_SUB  = 5'b11010,
    ALU_UMUL = 5'b11011,
    ALU_AND  = 5'b10001,
    ALU_ANDN = 5'b10010,
    ALU_OR   = 5'b10011,
    ALU_ORN  = 5'b10100,
    ALU_XOR  = 5'b10101,
    ALU_XNOR = 5'b10110,
    ALU_SLL  = 5'b01001,
    ALU_SRL  = 5'b01010,
    ALU_SRA  = 5'b01011
  } alu_op_t;

  // Control signals from the control unit to the datapath
  typedef struct packed {
    logic    en_pc;       // PC enable (T4)
    logic    en_npc;      // nPC enable (T0)
    logic    en_ir;       // IR enable (T0)
    logic    en_dec;      // opr1 / opr2 register enable (T1)
    logic    en_mar;      // MAR enable (T2, load/store)
    logic    en_mdr2;     // MDR2 (store data) enable (T1, store)
    logic    en_psr;      // PSR icc enable (T2, ...cc forms)
    logic    en_mdr;      // MDR enable (T3, load)
    logic    en_wb;       // write-back enable (T4)
    logic    wr_ram;      // RAM write (T3, store)
    alu_op_t aluctrl;     // ALU control (T2)
    logic    en_rom;      // ROM enable (T0)
    logic    en_exe_out;  // execute result register enable (T2)
    logic    en_rd;       // register-file read of R[rd] (T1)
    logic    en_rs1;      // register-file read of R[rs1] (T1)
    logic    en_rs2;      // register-file read of R[rs2] (T1, i = 0)
    logic    en_wrt;      // register-file write (T4, if rd is written)
    logic    en_ram;      // RAM access (T3, load/store)
    logic    sel_mdr;     // write back MDR rather than the execute result
    logic    wr_y;        // write the UMUL high word to Y (T4)
  } ctrl_t;

endpackage
