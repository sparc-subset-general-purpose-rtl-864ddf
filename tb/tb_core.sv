// tb_core: self-checking test of the core (datapath + control unit).
//
// The core runs a hand-written program from an instruction array and uses
// a data array as RAM. The program makes the largest positive number,
// overflows it with ADDcc, and branches on overflow, negative and carry
// (taken and not taken), then uses SRA, ANDN, ORN, ST, LD and ends in
// CALL 0. Final registers and the stored word are compared with values
// worked out by hand, each instruction must take five cycles, the ROM may
// be enabled only in Fetch and the RAM only in the Memory step.
`timescale 1ns/1ps
module tb_core;
  import sparc_pkg::*;
  import sparc_tb_pkg::*;
  logic        clk = 0, rst = 1, en = 0;
  logic [31:0] rom_addr, rom_data, ram_addr, ram_wdata, ram_rdata, pc, ir, psr, y;
  logic        rom_en, ram_en, ram_we;
  state_t      state;
  logic [31:0] rom [32];
  logic [31:0] ram [32];
  int checks = 0, failures = 0;
  int cyc = 0;

  core dut (.*);
  always #5 clk = ~clk;
  assign rom_data  = rom_en ? rom[rom_addr[6:2]] : 32'h0;
  assign ram_rdata = ram_en ? ram[ram_addr[6:2]] : 32'h0;
  always_ff @(posedge clk) if (ram_en && ram_we) ram[ram_addr[6:2]] <= ram_wdata;
  always @(posedge clk) cyc++;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  always @(negedge clk) if (!rst) begin
    chk(!rom_en || state == S_FETCH, "ROM enabled only in Fetch");
    chk(!ram_en || state == S_MEMORY, "RAM enabled only in Memory");
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] R(int k);
    return dut.u_dp.u_regfile.r[k];
  endfunction

  initial begin
    int last;
    foreach (rom[k]) rom[k] = 32'h0;
    foreach (ram[k]) ram[k] = 32'h0;
    rom[0]  = enc_f3(2'b10, 5'd1, 6'h02, 5'd0, 1, 13'h1FFF);  // or    r1, r0, -1
    rom[1]  = enc_f3(2'b10, 5'd2, 6'h26, 5'd1, 1, 13'd1);     // srl   r2, r1, 1
    rom[2]  = enc_f3(2'b10, 5'd3, 6'h10, 5'd2, 1, 13'd1);     // addcc r3, r2, 1
    rom[3]  = enc_bicc(4'h7, 22'd2);                          // bvs   +2 (taken)
    rom[4]  = enc_f3(2'b10, 5'd9, 6'h00, 5'd0, 1, 13'd1);
    rom[5]  = enc_bicc(4'h6, 22'd2);                          // bneg  +2 (taken)
    rom[6]  = enc_f3(2'b10, 5'd9, 6'h00, 5'd0, 1, 13'd2);
    rom[7]  = enc_f3(2'b10, 5'd4, 6'h10, 5'd1, 1, 13'd1);     // addcc r4, r1, 1
    rom[8]  = enc_bicc(4'h5, 22'd2);                          // bcs   +2 (taken)
    rom[9]  = enc_f3(2'b10, 5'd9, 6'h00, 5'd0, 1, 13'd3);
    rom[10] = enc_bicc(4'h6, 22'd5);                          // bneg  (not taken)
    rom[11] = enc_f3(2'b10, 5'd5, 6'h27, 5'd3, 1, 13'd4);     // sra   r5, r3, 4
    rom[12] = enc_f3(2'b10, 5'd6, 6'h05, 5'd1, 0, 13'd2);     // andn  r6, r1, r2
    rom[13] = enc_f3(2'b10, 5'd7, 6'h06, 5'd0, 0, 13'd2);     // orn   r7, r0, r2
    rom[14] = enc_f3(2'b11, 5'd5, 6'h04, 5'd0, 1, 13'd12);    // st    r5, [r0+12]
    rom[15] = enc_f3(2'b11, 5'd8, 6'h00, 5'd0, 1, 13'd12);    // ld    r8, [r0+12]
    rom[16] = enc_call(30'd0);                                // call  0
    @(negedge clk); rst = 0;
    @(negedge clk); en = 1;
    last = -1;
    for (int n = 0; n < 14; n++) begin
      while (state != S_WB) @(negedge clk);
      if (last >= 0) chk(cyc - last == 5, "five cycles per instruction");
      last = cyc;
      if (n == 2) chk(psr[23:20] == 4'b1010, "addcc overflow: n and v");
      if (n == 5) chk(psr[23:20] == 4'b0101, "addcc carry: z and c");
      @(negedge clk);
    end
    chk(R(1) == 32'hFFFFFFFF, "r1");
    chk(R(2) == 32'h7FFFFFFF, "r2");
    chk(R(3) == 32'h80000000, "r3");
    chk(R(4) == 32'h0,        "r4");
    chk(R(5) == 32'hF8000000, "r5 sra");
    chk(R(6) == 32'h80000000, "r6 andn");
    chk(R(7) == 32'h80000000, "r7 orn");
    chk(R(8) == 32'hF8000000, "r8 ld");
    chk(R(9) == 32'h0,        "skipped instructions");
    chk(ram[3] == 32'hF8000000, "stored word");
    chk(pc == 32'd64, "pc at the final call");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
