// writeback_unit: the Write Back step (T4).
//
// Combinational. While en_wb (write-back enable) and en_wrt (register
// write) are both high it asks the register file to store data_in in
// R[rd]; while en_wb and wr_y are high it stores hi_in (the high word of an
// unsigned multiply) in Y. The write itself happens at the rising edge that
// ends T4. The two enables follow the design's control-signal table; wr_y is
// this implementation's addition for the multiply's second result.
module writeback_unit (
  input  logic        en_wb,
  input  logic        en_wrt,
  input  logic        wr_y,
  input  logic [4:0]  rd,
  input  logic [31:0] data_in,
  input  logic [31:0] hi_in,
  output logic        rf_we,
  output logic [4:0]  rf_waddr,
  output logic [31:0] rf_wdata,
  output logic        y_we,
  output logic [31:0] y_wdata
);
  assign rf_we    = en_wb & en_wrt;
  assign rf_waddr = rd;
  assign rf_wdata = data_in;
  assign y_we     = en_wb & wr_y;
  assign y_wdata  = hi_in;
endmodule
