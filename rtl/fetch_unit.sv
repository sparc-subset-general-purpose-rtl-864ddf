// fetch_unit: Instruction Fetch - the PC, nPC and IR registers.
//
// Fetch (T0), with en_npc and en_ir high: IR <- M[PC] (rom_data, read
// combinationally at rom_addr = PC) and nPC <- PC + 4. Write Back (T4), with
// en_pc high: PC <- PC + disp when take is high (a CALL or a taken branch,
// disp being the byte displacement formed by the decode unit), else PC <-
// nPC. Each register changes only at the rising clock edge of the step whose
// enable is high. Synchronous reset clears PC, nPC and IR, so execution
// starts at address 0. The register set and the T0/T4 transfers follow the
// design's register-transfer description; the reset value is this
// implementation's choice.
module fetch_unit (
  input  logic        clk,
  input  logic        rst,
  input  logic        en_pc,
  input  logic        en_npc,
  input  logic        en_ir,
  input  logic        take,
  input  logic [31:0] disp,
  input  logic [31:0] rom_data,
  output logic [31:0] rom_addr,
  output logic [31:0] pc,
  output logic [31:0] npc,
  output logic [31:0] ir
);
  assign rom_addr = pc;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc  <= 32'h0;
      npc <= 32'h0;
      ir  <= 32'h0;
    end else begin
      if (en_npc) npc <= pc + 32'd4;
      if (en_ir)  ir  <= rom_data;
      if (en_pc)  pc  <= take ? pc + disp : npc;
    end
  end
endmodule
