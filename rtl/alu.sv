// alu: the arithmetic-logic unit of the Execute step (T2).
//
// Purely combinational. ctrl selects ADD, SUB, UMUL, AND, ANDN, OR, ORN,
// XOR, XNOR, SLL, SRL or SRA on operands a (opr1) and b (opr2); ALU_NOP
// gives zero. res is the 32-bit result; for UMUL res is the low word and
// res_hi the high word of the 64-bit product (zero for every other code).
// Shifts use b<4:0> as the count. icc = {n, z, v, c} follows SPARC V8: n and
// z from res, v and c from the add/subtract (c is the borrow for SUB), v = c
// = 0 for logic, shift and multiply. Loads and stores use ALU_ADD for the
// address. The operation set follows the design's instruction list; the
// flag rules are the SPARC definitions.
module alu
  import sparc_pkg::*;
(
  input  alu_op_t     ctrl,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] res,
  output logic [31:0] res_hi,
  output logic [3:0]  icc
);
  logic [32:0] sum, dif;
  logic [63:0] prod;
  logic        v, c;

  assign sum  = {1'b0, a} + {1'b0, b};
  assign dif  = {1'b0, a} - {1'b0, b};
  assign prod = {32'h0, a} * {32'h0, b};

  always_comb begin
    res    = 32'h0;
    res_hi = 32'h0;
    v      = 1'b0;
    c      = 1'b0;
    unique case (ctrl)
      ALU_ADD: begin
        res = sum[31:0];
        c   = sum[32];
        v   = (a[31] == b[31]) && (res[31] != a[31]);
      end
      ALU_SUB: begin
        res = dif[31:0];
        c   = dif[32];
        v   = (a[31] != b[31]) && (res[31] != a[31]);
      end
      ALU_UMUL: begin
        res    = prod[31:0];
        res_hi = prod[63:32];
      end
      ALU_AND:  res = a & b;
      ALU_ANDN: res = a & ~b;
      ALU_OR:   res = a | b;
      ALU_ORN:  res = a | ~b;
      ALU_XOR:  res = a ^ b;
      ALU_XNOR: res = ~(a ^ b);
      ALU_SLL:  res = a << b[4:0];
      ALU_SRL:  res = a >> b[4:0];
      ALU_SRA:  res = $signed(a) >>> b[4:0];
      default:  res = 32'h0;
    endcase
  end

  assign icc = {res[31], res == 32'h0, v, c};
endmodule
