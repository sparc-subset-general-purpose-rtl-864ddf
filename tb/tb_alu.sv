// tb_alu: self-checking test of the ALU.
//
// Drives every ALU code with directed corner operands and random ones and
// compares res, res_hi and icc with values computed here with 64-bit
// integer arithmetic (carry, borrow and overflow are derived from the wide
// results, not from the ALU's own formulas).
`timescale 1ns/1ps
module tb_alu;
  import sparc_pkg::*;
  alu_op_t     ctrl;
  logic [31:0] a, b, res, res_hi;
  logic [3:0]  icc;
  int checks = 0, failures = 0;

  alu dut (.ctrl(ctrl), .a(a), .b(b), .res(res), .res_hi(res_hi), .icc(icc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input alu_op_t op, input logic [31:0] x, input logic [31:0] z);
    longint      sa, sb, ws;
    logic [63:0] u;
    logic [31:0] er, eh;
    logic        ev, ec;
    ctrl = op; a = x; b = z;
    #1;
    sa = longint'($signed(x)); sb = longint'($signed(z));
    er = 0; eh = 0; ev = 0; ec = 0;
    case (op)
      ALU_ADD:  begin u = 64'(x) + 64'(z); er = u[31:0]; ec = u[32];
                      ws = sa + sb; ev = (ws > 64'sh7FFFFFFF) || (ws < -64'sh80000000); end
      ALU_SUB:  begin ec = (x < z); er = x - z;
                      ws = sa - sb; ev = (ws > 64'sh7FFFFFFF) || (ws < -64'sh80000000); end
      ALU_UMUL: begin u = 64'(x) * 64'(z); er = u[31:0]; eh = u[63:32]; end
      ALU_AND:  er = x & z;
      ALU_ANDN: er = x & ~z;
      ALU_OR:   er = x | z;
      ALU_ORN:  er = x | ~z;
      ALU_XOR:  er = x ^ z;
      ALU_XNOR: er = ~(x ^ z);
      ALU_SLL:  er = 32'(64'(x) << z[4:0]);
      ALU_SRL:  er = 32'(64'(x) >> z[4:0]);
      ALU_SRA:  er = 32'(sa >>> z[4:0]);
      default:  er = 0;
    endcase
    checks++;
    if (res !== er || res_hi !== eh || icc !== {er[31], er == 0, ev, ec}) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%h b=%h res=%h/%h hi=%h/%h icc=%b/%b", op.name(), x, z, res, er,
                 res_hi, eh, icc, {er[31], er == 0, ev, ec});
    end
  endtask

  initial begin
    alu_op_t ops [13] = '{ALU_NOP, ALU_ADD, ALU_SUB, ALU_UMUL, ALU_AND, ALU_ANDN, ALU_OR,
                          ALU_ORN, ALU_XOR, ALU_XNOR, ALU_SLL, ALU_SRL, ALU_SRA};
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'h7FFFFFFF, 32'h80000000, 32'hFFFFFFFF, 32'h12345678};
    foreach (ops[o]) begin
      foreach (corner[p]) foreach (corner[q]) one(ops[o], corner[p], corner[q]);
      repeat (300) one(ops[o], $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
