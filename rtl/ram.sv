// ram: data memory of the processor.
//
// WORDS 32-bit words, byte address in, word index = addr<AW+1:2> (the two
// low bits are ignored, the index wraps at WORDS). Write is synchronous:
// with en and we high, wdata is stored at the rising clock edge (the Memory
// step, T3, of a store). Read is combinational and gated by en, so the
// memory-access unit captures MDR <- M[MAR] at the edge that ends T3 of a
// load; with en low rdata is zero. The contents are not reset. Size, timing
// and gating are this implementation's choice; the design names a RAM that
// holds the results of load/store instructions.
module ram #(
  parameter int WORDS = 256
) (
  input  logic        clk,
  input  logic        en,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);
  localparam int AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] idx;

  assign idx   = addr[AW+1:2];
  assign rdata = en ? mem[idx] : 32'h0;

  always_ff @(posedge clk) begin
    if (en && we) mem[idx] <= wdata;
  end
endmodule
