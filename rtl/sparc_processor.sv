// sparc_processor: SPARC-subset processor - core with instruction ROM and data RAM.
//
// The top of the design. The core fetches from the ROM (ROM_WORDS words at
// byte addresses 0 .. 4*ROM_WORDS-1) and loads from / stores to the RAM
// (RAM_WORDS words). After rst the processor waits in Idle; raising en
// starts execution at address 0, one instruction per five clock cycles.
// The ROM is filled from ROM_INIT (hex, one word per line) when it is
// given, otherwise by writing the ROM array before en is raised. state, pc,
// ir, psr and y are outputs for observation. Ports are plain signals; the
// memory sizes are this implementation's choice.
module sparc_processor #(
  parameter int    ROM_WORDS = 256,
  parameter int    RAM_WORDS = 256,
  parameter string ROM_INIT  = ""
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  output logic [2:0]  state,
  output logic [31:0] pc,
  output logic [31:0] ir,
  output logic [31:0] psr,
  output logic [31:0] y
);
  logic [31:0] rom_addr, rom_data, ram_addr, ram_wdata, ram_rdata;
  logic        rom_en, ram_en, ram_we;
  sparc_pkg::state_t st;

  assign state = st;

  core u_core (
    .clk      (clk),
    .rst      (rst),
    .en       (en),
    .rom_addr (rom_addr),
    .rom_en   (rom_en),
    .rom_data (rom_data),
    .ram_addr (ram_addr),
    .ram_en   (ram_en),
    .ram_we   (ram_we),
    .ram_wdata(ram_wdata),
    .ram_rdata(ram_rdata),
    .state    (st),
    .pc       (pc),
    .ir       (ir),
    .psr      (psr),
    .y        (y)
  );

  rom #(.WORDS(ROM_WORDS), .INIT_FILE(ROM_INIT)) u_rom (
    .en  (rom_en),
    .addr(rom_addr),
    .data(rom_data)
  );

  ram #(.WORDS(RAM_WORDS)) u_ram (
    .clk  (clk),
    .en   (ram_en),
    .we   (ram_we),
    .addr (ram_addr),
    .wdata(ram_wdata),
    .rdata(ram_rdata)
  );
endmodule
