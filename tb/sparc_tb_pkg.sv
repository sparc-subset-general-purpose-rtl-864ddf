// sparc_tb_pkg: instruction encoders and a reference instruction-set model
// for the SPARC-subset processor testbenches.
//
// The encoders build SPARC V8 format-1/2/3 words. sparc_iss is an
// instruction-level model written from the SPARC V8 definitions of the
// subset (ADD SUB UMUL AND ANDN OR ORN XOR XNOR and cc forms, SLL SRL SRA,
// LD, ST, CALL without link, Bicc with BE/BCS/BNEG/BVS, everything else a
// no-operation). It keeps its own registers, Y, icc, PC and memories, and
// wraps ROM and RAM addresses the same way the hardware's memories do, so a
// testbench can run it in lockstep with the RTL and compare after every
// instruction.
package sparc_tb_pkg;

  function automatic logic [31:0] enc_f3(input logic [1:0] op, input logic [4:0] rd,
                                         input logic [5:0] op3, input logic [4:0] rs1,
                                         input logic i, input logic [12:0] imm_or_rs2);
    return {op, rd, op3, rs1, i, (i ? imm_or_rs2 : {8'h0, imm_or_rs2[4:0]})};
  endfunction

  function automatic logic [31:0] enc_call(input logic [29:0] disp30);
    return {2'b01, disp30};
  endfunction

  function automatic logic [31:0] enc_bicc(input logic [3:0] cond, input logic [21:0] disp22);
    return {2'b00, 1'b0, cond, 3'b010, disp22};
  endfunction

  class sparc_iss;
    int unsigned rom_words, ram_words;
    logic [31:0] r[32];
    logic [31:0] y;
    logic [3:0]  icc;      // n z v c
    logic [31:0] pc;
    logic [31:0] rom[];
    logic [31:0] ram[];
    // what the last step did
    string       kind;
    bit          taken;
    bit          stored;
    int unsigned st_idx;

    function new(int unsigned rw, int unsigned dw);
      rom_words = rw;
      ram_words = dw;
      rom = new[rw];
      ram = new[dw];
      reset();
    endfunction

    function void reset();
      foreach (r[k]) r[k] = 0;
      y = 0; icc = 0; pc = 0;
    endfunction

    function void step();
      logic [31:0] w, a, b, res, hi;
      logic [63:0] p;
      logic [1:0]  op;
      logic [5:0]  op3;
      logic [4:0]  rd;
      logic        cc, cnd, wr, v, c;
      w   = rom[(pc >> 2) % rom_words];
      op  = w[31:30];
      op3 = w[24:19];
      rd  = w[29:25];
      a   = r[w[18:14]];
      b   = w[13] ? {{19{w[12]}}, w[12:0]} : r[w[4:0]];
      kind = "NOP"; taken = 0; stored = 0; wr = 0; res = 0; v = 0; c = 0;
      if (op == 2'b01) begin
        kind = "CALL"; taken = 1;
        pc = pc + {w[29:0], 2'b00};
        return;
      end
      if (op == 2'b00) begin
        if (w[24:22] == 3'b010) begin
          case (w[28:25])
            4'h1: begin kind = "BE";   cnd = icc[2]; end
            4'h5: begin kind = "BCS";  cnd = icc[0]; end
            4'h6: begin kind = "BNEG"; cnd = icc[3]; end
            4'h7: begin kind = "BVS";  cnd = icc[1]; end
            default: begin kind = "BOTHER"; cnd = 0; end
          endcase
          taken = cnd;
          pc = cnd ? pc + {{8{w[21]}}, w[21:0], 2'b00} : pc + 4;
          return;
        end
        pc = pc + 4;
        return;
      end
      if (op == 2'b11) begin
        if (op3 == 6'h00) begin
          kind = "LD";
          r[rd] = ram[((a + b) >> 2) % ram_words];
        end else if (op3 == 6'h04) begin
          kind = "ST"; stored = 1;
          st_idx = ((a + b) >> 2) % ram_words;
          ram[st_idx] = r[rd];
        end
        r[0] = 0;
        pc = pc + 4;
        return;
      end
      // op = 10
      cc = (op3[5:4] == 2'b01);
      wr = 1;
      hi = 'x;
      case (op3 & 6'h2F)
        6'h00: begin kind = "ADD";  {c, res} = {1'b0, a} + {1'b0, b};
                     v = (a[31] & b[31] & ~res[31]) | (~a[31] & ~b[31] & res[31]); end
        6'h04: begin kind = "SUB";  {c, res} = {1'b0, a} - {1'b0, b};
                     v = (a[31] & ~b[31] & ~res[31]) | (~a[31] & b[31] & res[31]); end
        6'h0A: begin kind = "UMUL"; p = a * b; {hi, res} = p; end
        6'h01: begin kind = "AND";  res = a & b;    end
        6'h05: begin kind = "ANDN"; res = a & ~b;   end
        6'h02: begin kind = "OR";   res = a | b;    end
        6'h06: begin kind = "ORN";  res = a | ~b;   end
        6'h03: begin kind = "XOR";  res = a ^ b;    end
        6'h07: begin kind = "XNOR"; res = a ^ ~b;   end
        default: begin
          cc = 0;
          case (op3)
            6'h25: begin kind = "SLL"; res = a << b[4:0]; end
            6'h26: begin kind = "SRL"; res = a >> b[4:0]; end
            6'h27: begin kind = "SRA"; res = 32'($signed(a) >>> b[4:0]); end
            default: wr = 0;
          endcase
        end
      endcase
      if (wr) begin
        if (kind == "UMUL") y = hi;
        if (cc) begin
          icc = {res[31], res == 0, v, c};
          kind = {kind, "cc"};
        end
        r[rd] = res;
        r[0] = 0;
      end
      pc = pc + 4;
    endfunction
  endclass

  // A random instruction of the subset, with a bias toward useful encodings.
  // Branch and call displacements are forward, 1 to 8 words, so a program
  // keeps moving through the whole ROM (and wraps around at its end).
  function automatic logic [31:0] rand_instr();
    int unsigned sel;
    logic [5:0]  alu_op3 [12] = '{6'h00, 6'h04, 6'h0A, 6'h01, 6'h05, 6'h02,
                                  6'h06, 6'h03, 6'h07, 6'h25, 6'h26, 6'h27};
    logic [3:0]  conds [5] = '{4'h1, 4'h5, 4'h6, 4'h7, 4'h0};
    logic [5:0]  o3;
    logic [12:0] imm;
    logic        i;
    sel = $urandom_range(0, 99);
    i   = $urandom_range(0, 1);
    imm = (i && $urandom_range(0, 1)) ? 13'($urandom_range(0, 8191)) : 13'($urandom_range(0, 31));
    if (sel < 55) begin
      o3 = alu_op3[$urandom_range(0, 11)];
      if (o3[5] == 1'b0 && $urandom_range(0, 1)) o3 = o3 | 6'h10;
      return enc_f3(2'b10, 5'($urandom), o3, 5'($urandom), i, imm);
    end
    if (sel < 65) return enc_f3(2'b11, 5'($urandom), 6'h00, 5'($urandom), i, imm);
    if (sel < 75) return enc_f3(2'b11, 5'($urandom), 6'h04, 5'($urandom), i, imm);
    if (sel < 92) return enc_bicc(conds[$urandom_range(0, 4)],
                                  22'($urandom_range(1, 8)));
    if (sel < 96) return enc_call(30'($urandom_range(1, 8)));
    return {2'b00, 5'($urandom), 3'b100, 22'($urandom)};  // SETHI: unsupported, no-op
  endfunction

endpackage
