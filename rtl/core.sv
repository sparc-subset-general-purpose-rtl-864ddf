// core: the processor core - datapath plus control unit.
//
// The control unit reads op, op2, op3 and i from the datapath's IR and
// drives the datapath's register enables step by step. After rst the core
// sits in Idle; a high en starts it, and from then on it fetches and
// executes one instruction every five clock cycles (Fetch, Decode, Execute,
// Memory, Write Back), starting at address 0, until rst returns it to Idle.
// The instruction ROM and the data RAM connect through rom_* (combinational
// read during Fetch) and ram_* (combinational read, write at the clock edge
// ending the Memory step). state, pc, ir, psr and y are brought out for
// observation. The split into datapath and control unit follows the
// design's block diagram.
module core
  import sparc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  output logic [31:0] rom_addr,
  output logic        rom_en,
  input  logic [31:0] rom_data,
  output logic [31:0] ram_addr,
  output logic        ram_en,
  output logic        ram_we,
  output logic [31:0] ram_wdata,
  input  logic [31:0] ram_rdata,
  output state_t      state,
  output logic [31:0] pc,
  output logic [31:0] ir,
  output logic [31:0] psr,
  output logic [31:0] y
);
  ctrl_t      ctrl;
  logic [1:0] op;
  logic [2:0] op2;
  logic [5:0] op3;
  logic       i;

  control_unit u_cu (
    .clk  (clk),
    .rst  (rst),
    .en   (en),
    .op   (op),
    .op2  (op2),
    .op3  (op3),
    .i    (i),
    .state(state),
    .ctrl (ctrl)
  );

  datapath u_dp (
    .clk      (clk),
    .rst      (rst),
    .ctrl     (ctrl),
    .op       (op),
    .op2      (op2),
    .op3      (op3),
    .i        (i),
    .rom_addr (rom_addr),
    .rom_en   (rom_en),
    .rom_data (rom_data),
    .ram_addr (ram_addr),
    .ram_en   (ram_en),
    .ram_we   (ram_we),
    .ram_wdata(ram_wdata),
    .ram_rdata(ram_rdata),
    .pc       (pc),
    .ir       (ir),
    .psr      (psr),
    .y        (y)
  );

  // Memory-port rules: the ROM is read only in Fetch, the RAM is touched
  // only in the Memory step and never written without its access strobe,
  // and the PC moves only in Write Back.
  a_rom_in_fetch:    assert property (@(posedge clk) disable iff (rst) rom_en |-> state == S_FETCH);
  a_ram_in_memory:   assert property (@(posedge clk) disable iff (rst) ram_en |-> state == S_MEMORY);
  a_ram_we_needs_en: assert property (@(posedge clk) disable iff (rst) ram_we |-> ram_en);
  a_pc_in_wb:        assert property (@(posedge clk) disable iff (rst) ctrl.en_pc |-> state == S_WB);
endmodule
