// mem_access: the Memory step (T3) - MAR, MDR and MDR2.
//
// MDR2 <- R[rd] in Decode (T1) of a store (en_mdr2); MAR <- the ALU's
// address opr1 + opr2 in Execute (T2) (en_mar); in Memory (T3) a load
// captures MDR <- M[MAR] (en_mdr) and a store drives M[MAR] <- MDR2 with
// ram_we (wr_ram). ram_en is the RAM access strobe of T3. data_out forwards
// to write back either MDR (sel_mdr, for a load) or the execute result.
// Synchronous reset clears the three registers. The registers and their
// steps follow the design's register-transfer description for LD and ST;
// the data_out multiplexer and its select are this implementation's way of
// sharing the single write-back path.
module mem_access (
  input  logic        clk,
  input  logic        rst,
  input  logic        en_mar,
  input  logic        en_mdr,
  input  logic        en_mdr2,
  input  logic        en_ram,
  input  logic        wr_ram,
  input  logic        sel_mdr,
  input  logic [31:0] addr_in,
  input  logic [31:0] store_in,
  input  logic [31:0] exe_in,
  output logic [31:0] ram_addr,
  output logic [31:0] ram_wdata,
  output logic        ram_en,
  output logic        ram_we,
  input  logic [31:0] ram_rdata,
  output logic [31:0] data_out
);
  logic [31:0] mar, mdr, mdr2;

  always_ff @(posedge clk) begin
    if (rst) begin
      mar  <= 32'h0;
      mdr  <= 32'h0;
      mdr2 <= 32'h0;
    end else begin
      if (en_mar)  mar  <= addr_in;
      if (en_mdr2) mdr2 <= store_in;
      if (en_mdr)  mdr  <= ram_rdata;
    end
  end

  assign ram_addr  = mar;
  assign ram_wdata = mdr2;
  assign ram_en    = en_ram;
  assign ram_we    = en_ram & wr_ram;
  assign data_out  = sel_mdr ? mdr : exe_in;
endmodule
