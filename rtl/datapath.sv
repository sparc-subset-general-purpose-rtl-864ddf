// datapath: the processor's datapath - every unit that holds or moves data.
//
// Instruction Fetch (PC, nPC, IR) -> Instruction Decode (fields, opr1,
// opr2, rd, branch decision) <-> Register File (r0..r31, Y) -> Execute (ALU,
// result register, PSR icc) -> Memory Access (MAR, MDR, MDR2, RAM port) ->
// Write Back -> Register File. Decode returns the displacement and the
// taken flag to Fetch for the PC update of T4, and Execute returns icc to
// Decode for the branch decision. Every register is enabled by one field of
// ctrl, so nothing moves unless the control unit selects the step; an
// instruction takes the five steps T0..T4. The ROM and RAM are outside:
// rom_* and ram_* are their ports. The unit boundaries and the connections
// follow the design's block diagram.
module datapath
  import sparc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  ctrl_t       ctrl,
  output logic [1:0]  op,
  output logic [2:0]  op2,
  output logic [5:0]  op3,
  output logic        i,
  output logic [31:0] rom_addr,
  output logic        rom_en,
  input  logic [31:0] rom_data,
  output logic [31:0] ram_addr,
  output logic        ram_en,
  output logic        ram_we,
  output logic [31:0] ram_wdata,
  input  logic [31:0] ram_rdata,
  output logic [31:0] pc,
  output logic [31:0] ir,
  output logic [31:0] psr,
  output logic [31:0] y
);
  logic [31:0] npc, disp, opr1, opr2, rs1_data, rs2_data, rd_data;
  logic [31:0] alu_res, exe_res, exe_hi, mem_out, rf_wdata, y_wdata;
  logic [4:0]  rs1, rs2, rd, rd_out, rf_waddr;
  logic [3:0]  icc;
  logic        take, rf_we, y_we;

  assign rom_en = ctrl.en_rom;

  fetch_unit u_fetch (
    .clk     (clk),
    .rst     (rst),
    .en_pc   (ctrl.en_pc),
    .en_npc  (ctrl.en_npc),
    .en_ir   (ctrl.en_ir),
    .take    (take),
    .disp    (disp),
    .rom_data(rom_data),
    .rom_addr(rom_addr),
    .pc      (pc),
    .npc     (npc),
    .ir      (ir)
  );

  decode_unit u_decode (
    .clk     (clk),
    .rst     (rst),
    .en_dec  (ctrl.en_dec),
    .ir      (ir),
    .icc     (icc),
    .rs1_data(rs1_data),
    .rs2_data(rs2_data),
    .op      (op),
    .op2     (op2),
    .op3     (op3),
    .i       (i),
    .rs1     (rs1),
    .rs2     (rs2),
    .rd      (rd),
    .opr1    (opr1),
    .opr2    (opr2),
    .rd_out  (rd_out),
    .disp    (disp),
    .take    (take)
  );

  regfile u_regfile (
    .clk     (clk),
    .rst     (rst),
    .en_rs1  (ctrl.en_rs1),
    .en_rs2  (ctrl.en_rs2),
    .en_rd   (ctrl.en_rd),
    .rs1     (rs1),
    .rs2     (rs2),
    .rd      (rd),
    .rs1_data(rs1_data),
    .rs2_data(rs2_data),
    .rd_data (rd_data),
    .we      (rf_we),
    .waddr   (rf_waddr),
    .wdata   (rf_wdata),
    .y_we    (y_we),
    .y_wdata (y_wdata),
    .y       (y)
  );

  execute_unit u_execute (
    .clk       (clk),
    .rst       (rst),
    .aluctrl   (ctrl.aluctrl),
    .en_exe_out(ctrl.en_exe_out),
    .en_psr    (ctrl.en_psr),
    .opr1      (opr1),
    .opr2      (opr2),
    .alu_res   (alu_res),
    .res       (exe_res),
    .res_hi    (exe_hi),
    .icc       (icc),
    .psr       (psr)
  );

  mem_access u_mem (
    .clk      (clk),
    .rst      (rst),
    .en_mar   (ctrl.en_mar),
    .en_mdr   (ctrl.en_mdr),
    .en_mdr2  (ctrl.en_mdr2),
    .en_ram   (ctrl.en_ram),
    .wr_ram   (ctrl.wr_ram),
    .sel_mdr  (ctrl.sel_mdr),
    .addr_in  (alu_res),
    .store_in (rd_data),
    .exe_in   (exe_res),
    .ram_addr (ram_addr),
    .ram_wdata(ram_wdata),
    .ram_en   (ram_en),
    .ram_we   (ram_we),
    .ram_rdata(ram_rdata),
    .data_out (mem_out)
  );

  writeback_unit u_wb (
    .en_wb   (ctrl.en_wb),
    .en_wrt  (ctrl.en_wrt),
    .wr_y    (ctrl.wr_y),
    .rd      (rd_out),
    .data_in (mem_out),
    .hi_in   (exe_hi),
    .rf_we   (rf_we),
    .rf_waddr(rf_waddr),
    .rf_wdata(rf_wdata),
    .y_we    (y_we),
    .y_wdata (y_wdata)
  );
endmodule
