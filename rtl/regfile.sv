// regfile: integer register file r0..r31 plus the Y register.
//
// Three combinational read ports serve the Decode step (T1): R[rs1] and
// R[rs2] give the operands, R[rd] gives the store data for a store. Each port
// reads zero unless its enable (en_rs1, en_rs2, en_rd) is high. r0 always
// reads zero and ignores writes. One synchronous write port, used in Write
// Back (T4): wdata goes to R[waddr] at the rising edge when we is high. The Y
// register receives the high word of an unsigned multiply when y_we is high.
// Reset clears every register. The design uses a flat set of 32 registers
// with no register windows; the count, the zero register and the reset are
// this implementation's reading of the SPARC integer unit.
module regfile #(
  parameter int NREGS = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en_rs1,
  input  logic        en_rs2,
  input  logic        en_rd,
  input  logic [4:0]  rs1,
  input  logic [4:0]  rs2,
  input  logic [4:0]  rd,
  output logic [31:0] rs1_data,
  output logic [31:0] rs2_data,
  output logic [31:0] rd_data,
  input  logic        we,
  input  logic [4:0]  waddr,
  input  logic [31:0] wdata,
  input  logic        y_we,
  input  logic [31:0] y_wdata,
  output logic [31:0] y
);
  logic [31:0] r [NREGS];

  function automatic logic [31:0] rd_port(input logic ena, input logic [4:0] a);
    if (!ena || a == 5'd0 || int'(a) >= NREGS) return 32'h0;
    return r[a];
  endfunction

  assign rs1_data = rd_port(en_rs1, rs1);
  assign rs2_data = rd_port(en_rs2, rs2);
  assign rd_data  = rd_port(en_rd, rd);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NREGS; k++) r[k] <= 32'h0;
      y <= 32'h0;
    end else begin
      if (we && waddr != 5'd0 && int'(waddr) < NREGS) r[waddr] <= wdata;
      if (y_we) y <= y_wdata;
    end
  end
endmodule
