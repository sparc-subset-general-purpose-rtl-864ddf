// rom: instruction memory of the processor.
//
// WORDS 32-bit words, addressed by the byte address from the fetch unit
// (addr<1:0> is ignored, the word index wraps at WORDS). Read is
// combinational: while en (en_rom, active in Fetch/T0) is high, data shows
// the word at addr, so the fetch unit captures IR <- M[PC] at the clock edge
// that ends T0; with en low the output is zero. Contents come from INIT_FILE
// (hex, one word per line) when it is given; otherwise a testbench writes
// mem before starting the processor. The size and the read timing are this
// implementation's choice; the design only states that instructions are
// fetched from a read-only memory.
module rom #(
  parameter int    WORDS     = 256,
  parameter string INIT_FILE = ""
) (
  input  logic        en,
  input  logic [31:0] addr,
  output logic [31:0] data
);
  localparam int AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0] mem [WORDS];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  logic [AW-1:0] idx;
  assign idx  = addr[AW+1:2];
  assign data = en ? mem[idx] : 32'h0;
endmodule
