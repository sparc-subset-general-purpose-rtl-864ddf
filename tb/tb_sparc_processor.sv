// tb_sparc_processor: end-to-end test of the whole processor at its default
// sizes (ROM and RAM 256 words each).
//
// Phase 1 runs a short hand-written program and checks the registers, Y and
// the RAM word against values worked out by hand, and that each instruction
// takes five clock cycles. Phase 2 fills the ROM with random instructions of
// the subset (plus unsupported encodings) and the RAM with random data, and
// runs the processor in lockstep with the reference model of sparc_tb_pkg:
// after every Write Back it compares all registers, Y, icc, the PC and any
// stored RAM word. Every sixteenth ROM word starts a group of two loads, an
// ADDcc or SUBcc on the loaded words and a BCS or BVS, so that carry and
// overflow are set and tested often. Partway through, rst is raised in the middle of an
// instruction; the test checks the return to Idle, that the processor waits
// there while en is low, and then continues from address 0. Every
// instruction kind, both outcomes of every branch condition, the cc forms,
// the unsupported-encoding no-op, the reset, the Idle wait and the setting
// of carry and overflow are counted;
// any that never happened counts as a failure.
`timescale 1ns/1ps
module tb_sparc_processor;
  import sparc_pkg::*;
  import sparc_tb_pkg::*;

  localparam int ROMW = 256;
  localparam int RAMW = 256;
  localparam int N_RANDOM = 3000;

  logic        clk = 0, rst = 1, en = 0;
  logic [2:0]  state;
  logic [31:0] pc, ir, psr, y;
  int          checks = 0, failures = 0;
  int          cyc = 0;

  sparc_processor dut (.clk(clk), .rst(rst), .en(en), .state(state), .pc(pc),
                       .ir(ir), .psr(psr), .y(y));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  sparc_iss iss;
  int       seen[string];

  task automatic do_reset();
    rst = 1; en = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
  endtask

  // Wait for the end of the next Write Back step; return the cycle count
  // from the previous one.
  int last_wb_cyc;
  task automatic next_retire(output int gap);
    while (state != 3'(S_WB)) @(negedge clk);
    @(posedge clk);
    #1;
    gap = cyc - last_wb_cyc;
    last_wb_cyc = cyc;
  endtask

  task automatic compare_state(input string tag);
    bit ok;
    ok = 1;
    for (int k = 0; k < 32; k++)
      if (dut.u_core.u_dp.u_regfile.r[k] !== iss.r[k]) ok = 0;
    check(ok, {tag, " registers"});
    check(y === iss.y, {tag, " Y"});
    check(psr[23:20] === iss.icc, {tag, " icc"});
    check(pc === iss.pc, $sformatf("%s PC dut=%h ref=%h", tag, pc, iss.pc));
    if (iss.stored) check(dut.u_ram.mem[iss.st_idx] === iss.ram[iss.st_idx], {tag, " stored word"});
  endtask

  initial begin : main
    logic [31:0] prog [13];
    int gap;

    iss = new(ROMW, RAMW);

    // ---------------- phase 1: hand-checked program ----------------
    prog[0]  = enc_f3(2'b10, 5'd1, 6'h00, 5'd0, 1, 13'd7);          // add  r1, r0, 7
    prog[1]  = enc_f3(2'b10, 5'd2, 6'h00, 5'd0, 1, 13'h1FFD);       // add  r2, r0, -3
    prog[2]  = enc_f3(2'b10, 5'd3, 6'h0A, 5'd1, 0, 13'd2);          // umul r3, r1, r2
    prog[3]  = enc_f3(2'b11, 5'd3, 6'h04, 5'd0, 1, 13'd8);          // st   r3, [r0+8]
    prog[4]  = enc_f3(2'b11, 5'd4, 6'h00, 5'd0, 1, 13'd8);          // ld   r4, [r0+8]
    prog[5]  = enc_f3(2'b10, 5'd5, 6'h14, 5'd1, 0, 13'd1);          // subcc r5, r1, r1
    prog[6]  = enc_bicc(4'h1, 22'd2);                               // be   +2
    prog[7]  = enc_f3(2'b10, 5'd6, 6'h00, 5'd0, 1, 13'd1);          // (skipped)
    prog[8]  = enc_f3(2'b10, 5'd7, 6'h25, 5'd1, 1, 13'd4);          // sll  r7, r1, 4
    prog[9]  = enc_call(30'd2);                                     // call +2
    prog[10] = enc_f3(2'b10, 5'd6, 6'h00, 5'd0, 1, 13'd2);          // (skipped)
    prog[11] = enc_f3(2'b10, 5'd8, 6'h07, 5'd0, 0, 13'd0);          // xnor r8, r0, r0
    prog[12] = enc_call(30'd0);                                     // call 0 (stay)
    for (int k = 0; k < ROMW; k++) dut.u_rom.mem[k] = (k < 13) ? prog[k] : 32'h0;
    for (int k = 0; k < RAMW; k++) dut.u_ram.mem[k] = 32'h0;

    do_reset();
    check(state == 3'(S_IDLE), "idle after reset");
    @(negedge clk) en = 1;
    last_wb_cyc = cyc;
    for (int n = 0; n < 12; n++) begin
      next_retire(gap);
      if (n > 0) check(gap == 5, $sformatf("five cycles per instruction (got %0d)", gap));
    end
    check(dut.u_core.u_dp.u_regfile.r[1] == 32'd7,        "r1 = 7");
    check(dut.u_core.u_dp.u_regfile.r[2] == 32'hFFFFFFFD, "r2 = -3");
    check(dut.u_core.u_dp.u_regfile.r[3] == 32'hFFFFFFEB, "r3 = low(7*(2^32-3))");
    check(y == 32'd6,                                     "Y = high(7*(2^32-3))");
    check(dut.u_ram.mem[2] == 32'hFFFFFFEB,               "RAM[8] stored");
    check(dut.u_core.u_dp.u_regfile.r[4] == 32'hFFFFFFEB, "r4 loaded");
    check(dut.u_core.u_dp.u_regfile.r[5] == 32'd0,        "r5 = 0");
    check(psr[23:20] == 4'b0100,                          "icc z set");
    check(dut.u_core.u_dp.u_regfile.r[6] == 32'd0,        "skipped instructions");
    check(dut.u_core.u_dp.u_regfile.r[7] == 32'd112,      "r7 = 7 << 4");
    check(dut.u_core.u_dp.u_regfile.r[8] == 32'hFFFFFFFF, "r8 = xnor");
    check(pc == 32'd48,                                   "halted on call 0");

    // ---------------- phase 2: random lockstep ----------------
    do_reset();
    // random instructions, with a flag-setting group every so often:
    // two loads of random words, ADDcc or SUBcc on them, then a branch
    for (int k = 0; k < ROMW; k++) begin
      if (k % 16 == 8 && k + 4 <= ROMW) begin
        iss.rom[k]     = enc_f3(2'b11, 5'd20, 6'h00, 5'd0, 1, 13'(4 * $urandom_range(0, 63)));
        iss.rom[k + 1] = enc_f3(2'b11, 5'd21, 6'h00, 5'd0, 1, 13'(4 * $urandom_range(0, 63)));
        iss.rom[k + 2] = enc_f3(2'b10, 5'd22, $urandom_range(0, 1) ? 6'h10 : 6'h14, 5'd20, 0, 13'd21);
        iss.rom[k + 3] = enc_bicc(($urandom_range(0, 1)) ? 4'h5 : 4'h7, 22'($urandom_range(1, 3)));
        k += 3;
      end else begin
        iss.rom[k] = rand_instr();
      end
    end
    for (int k = 0; k < ROMW; k++) dut.u_rom.mem[k] = iss.rom[k];
    for (int k = 0; k < RAMW; k++) begin
      iss.ram[k] = $urandom;
      if (k % 7 == 0) iss.ram[k] = 32'h80000000 >> (k % 5);
      dut.u_ram.mem[k] = iss.ram[k];
    end
    iss.reset();
    // the processor must wait in Idle while en is low
    repeat (4) @(negedge clk);
    check(state == 3'(S_IDLE), "waits in Idle while en is low");
    seen["IDLE_WAIT"]++;
    en = 1;
    last_wb_cyc = cyc;
    for (int n = 0; n < N_RANDOM; n++) begin
      if (n == N_RANDOM / 2) begin
        // reset in the middle of an instruction (Execute step)
        while (state != 3'(S_EXECUTE)) @(negedge clk);
        rst = 1;
        @(posedge clk); #1;
        check(state == 3'(S_IDLE), "rst forces Idle");
        check(pc == 0, "rst clears PC");
        rst = 0; en = 0;
        repeat (3) @(negedge clk);
        check(state == 3'(S_IDLE), "stays Idle after reset while en is low");
        seen["RESET"]++;
        iss.reset();
        en = 1;
        last_wb_cyc = cyc;
        next_retire(gap);
      end else begin
        next_retire(gap);
        if (n > 0) check(gap == 5, "five cycles per instruction");
      end
      iss.step();
      seen[iss.kind]++;
      if (iss.kind[0] == "B" && iss.kind != "BOTHER") seen[{iss.kind, iss.taken ? "_T" : "_NT"}]++;
      if (iss.kind.len() > 2 && iss.kind.substr(iss.kind.len() - 2, iss.kind.len() - 1) == "cc")
        seen["CC_FORM"]++;
      compare_state($sformatf("instr %0d (%s)", n, iss.kind));
      if (iss.icc[0]) seen["C_SET"]++; if (iss.icc[1]) seen["V_SET"]++;
    end

    begin
      string need [] = '{"ADD", "SUB", "UMUL", "AND", "ANDN", "OR", "ORN", "XOR", "XNOR",
                         "SLL", "SRL", "SRA", "LD", "ST", "CALL", "NOP", "CC_FORM",
                         "BE_T", "BE_NT", "BCS_T", "BCS_NT", "BNEG_T", "BNEG_NT",
                         "BVS_T", "BVS_NT", "BOTHER", "UMULcc", "RESET", "IDLE_WAIT", "C_SET", "V_SET"};
      foreach (need[k]) begin
        $display("mechanism %-9s happened %0d times", need[k], seen.exists(need[k]) ? seen[need[k]] : 0);
        check(seen.exists(need[k]), {"mechanism never happened: ", need[k]});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
