// decode_unit: Instruction Decode - field split, operand latch, branch decision.
//
// Combinationally splits IR into op<31:30>, rd<29:25>, op2<24:22>,
// op3<24:19>, rs1<18:14>, i<13>, simm13<12:0> and rs2<4:0>; op, op2, op3 and i
// go to the control unit, rs1, rs2 and rd address the register file. In
// Decode (T1), with en_dec high, it latches opr1 <- R[rs1], opr2 <- R[rs2]
// (i = 0) or the sign-extended simm13 (i = 1), rd_out <- rd, and the
// PC-relative transfer of Write Back: for CALL, take = 1 and disp =
// disp30 * 4; for Bicc, take = the branch condition evaluated against
// icc = {n, z, v, c} from PSR<23:20>, disp = sign-extended disp22 * 4; for
// everything else take = 0. The subset's conditions are BE (z), BCS (c),
// BNEG (n) and BVS (v); BN and the conditions outside the subset never
// branch. Without a delay slot the annul bit a has no effect. Synchronous
// reset clears the latched values. The field positions and T1 transfers
// follow SPARC V8 and the design's register-transfer description; the
// handling of the annul bit and of unlisted conditions is this
// implementation's choice.
module decode_unit
  import sparc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en_dec,
  input  logic [31:0] ir,
  input  logic [3:0]  icc,
  input  logic [31:0] rs1_data,
  input  logic [31:0] rs2_data,
  output logic [1:0]  op,
  output logic [2:0]  op2,
  output logic [5:0]  op3,
  output logic        i,
  output logic [4:0]  rs1,
  output logic [4:0]  rs2,
  output logic [4:0]  rd,
  output logic [31:0] opr1,
  output logic [31:0] opr2,
  output logic [4:0]  rd_out,
  output logic [31:0] disp,
  output logic        take
);
  logic [3:0]  cond;
  logic        cond_true;
  logic [31:0] simm, disp_d;
  logic        take_d;

  assign op   = ir[31:30];
  assign rd   = ir[29:25];
  assign op2  = ir[24:22];
  assign op3  = ir[24:19];
  assign rs1  = ir[18:14];
  assign i    = ir[13];
  assign rs2  = ir[4:0];
  assign cond = ir[28:25];
  assign simm = {{19{ir[12]}}, ir[12:0]};

  // icc = {n, z, v, c}
  always_comb begin
    unique case (cond)
      COND_BE:   cond_true = icc[2];
      COND_BCS:  cond_true = icc[0];
      COND_BNEG: cond_true = icc[3];
      COND_BVS:  cond_true = icc[1];
      COND_BN:   cond_true = 1'b0;
      default:   cond_true = 1'b0;
    endcase
  end

  always_comb begin
    take_d = 1'b0;
    disp_d = 32'h0;
    if (op == OP_CALL) begin
      take_d = 1'b1;
      disp_d = {ir[29:0], 2'b00};
    end else if (op == OP_FMT2 && op2 == OP2_BICC) begin
      take_d = cond_true;
      disp_d = {{8{ir[21]}}, ir[21:0], 2'b00};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      opr1   <= 32'h0;
      opr2   <= 32'h0;
      rd_out <= 5'd0;
      disp   <= 32'h0;
      take   <= 1'b0;
    end else if (en_dec) begin
      opr1   <= rs1_data;
      opr2   <= i ? simm : rs2_data;
      rd_out <= rd;
      disp   <= disp_d;
      take   <= take_d;
    end
  end
endmodule
