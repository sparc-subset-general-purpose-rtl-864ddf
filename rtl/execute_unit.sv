// execute_unit: the Execute step (T2) - ALU, result registers and PSR.
//
// The ALU works combinationally on opr1/opr2 under aluctrl; alu_res is
// offered directly to the memory-access unit, which loads it into MAR for a
// load or store. At the rising edge that ends T2, en_exe_out loads the result
// register res (and res_hi, the high word of an unsigned multiply) and
// en_psr (the ...cc instruction forms) loads the integer condition codes.
// psr presents them at PSR<23:20> = {n, z, v, c}; the other PSR fields are
// not part of the subset and read zero. Synchronous reset clears all three.
// The T2 transfers follow the design's register-transfer description; the
// reduced PSR is this implementation's choice.
module execute_unit
  import sparc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  alu_op_t     aluctrl,
  input  logic        en_exe_out,
  input  logic        en_psr,
  input  logic [31:0] opr1,
  input  logic [31:0] opr2,
  output logic [31:0] alu_res,
  output logic [31:0] res,
  output logic [31:0] res_hi,
  output logic [3:0]  icc,
  output logic [31:0] psr
);
  logic [31:0] hi_d;
  logic [3:0]  icc_d;

  alu u_alu (
    .ctrl  (aluctrl),
    .a     (opr1),
    .b     (opr2),
    .res   (alu_res),
    .res_hi(hi_d),
    .icc   (icc_d)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      res    <= 32'h0;
      res_hi <= 32'h0;
      icc    <= 4'h0;
    end else begin
      if (en_exe_out) begin
        res    <= alu_res;
        res_hi <= hi_d;
      end
      if (en_psr) icc <= icc_d;
    end
  end

  assign psr = {8'h0, icc, 20'h0};
endmodule
