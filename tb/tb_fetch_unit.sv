// tb_fetch_unit: self-checking test of the fetch unit (PC, nPC, IR).
//
// Runs random five-step sequences: in T0 (en_npc, en_ir) IR must take the
// ROM word and nPC must become PC + 4; in T4 (en_pc) PC must become
// PC + disp when take is high and nPC otherwise. Between the enables every
// register must hold. A model PC is kept here.
`timescale 1ns/1ps
module tb_fetch_unit;
  logic        clk = 0, rst = 1;
  logic        en_pc, en_npc, en_ir, take;
  logic [31:0] disp, rom_data, rom_addr, pc, npc, ir;
  logic [31:0] mpc;
  int checks = 0, failures = 0;

  fetch_unit dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s pc=%h model=%h", s, pc, mpc); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w, d;
    logic        t;
    en_pc = 0; en_npc = 0; en_ir = 0; take = 0; disp = 0; rom_data = 0;
    @(posedge clk); #1 rst = 0;
    mpc = 0;
    chk(pc == 0 && ir == 0, "reset");
    repeat (500) begin
      w = $urandom; t = $urandom_range(0, 1); d = {$urandom, 2'b00};
      // T0
      @(negedge clk); en_npc = 1; en_ir = 1; rom_data = w;
      chk(rom_addr == mpc, "ROM address is PC");
      @(negedge clk); en_npc = 0; en_ir = 0; rom_data = $urandom;
      chk(ir == w, "IR <- M[PC]");
      chk(npc == mpc + 4, "nPC <- PC + 4");
      // T1..T3: nothing may move
      take = t; disp = d;
      repeat (3) @(negedge clk);
      chk(ir == w && pc == mpc, "hold");
      // T4
      en_pc = 1;
      @(negedge clk); en_pc = 0;
      mpc = t ? mpc + d : mpc + 4;
      chk(pc == mpc, "PC update");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
