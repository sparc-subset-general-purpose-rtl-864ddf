// tb_instruction_set: runs the nineteen instructions of the subset, in the
// order ADD SUB UMUL AND ANDN OR ORN XOR XNOR SLL SRL SRA LD ST CALL BE BCS
// BNEG BVS, as a test program on the full processor at its default sizes.
//
// Every result was worked out by hand and is listed next to its
// instruction. The testbench records the PC of each instruction as it
// leaves Write Back and compares the sequence with the expected path
// (taken branches and CALL skip one instruction each), checks that each
// instruction takes five cycles, and checks the final registers, Y, the
// stored RAM word and that the skipped instructions left r31 at zero.
`timescale 1ns/1ps
module tb_instruction_set;
  import sparc_pkg::*;
  import sparc_tb_pkg::*;

  logic        clk = 0, rst = 1, en = 0;
  logic [2:0]  state;
  logic [31:0] pc, ir, psr, y;
  int checks = 0, failures = 0, cyc = 0;

  sparc_processor dut (.clk(clk), .rst(rst), .en(en), .state(state), .pc(pc),
                       .ir(ir), .psr(psr), .y(y));
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] R(int k);
    return dut.u_core.u_dp.u_regfile.r[k];
  endfunction

  logic [31:0] p [29];
  int          path [] = '{0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14,
                           16, 17, 19, 20, 22, 24, 25, 26, 28};

  initial begin
    int last;
    p[0]  = enc_f3(2'b10, 5'd1,  6'h00, 5'd0, 1, 13'd12);     // add   r1 = 12
    p[1]  = enc_f3(2'b10, 5'd2,  6'h04, 5'd1, 1, 13'd20);     // sub   r2 = 12-20 = 0xFFFFFFF8
    p[2]  = enc_f3(2'b10, 5'd3,  6'h0A, 5'd2, 0, 13'd1);      // umul  r3 = 0xFFFFFFA0, Y = 11
    p[3]  = enc_f3(2'b10, 5'd4,  6'h01, 5'd3, 1, 13'hFF);     // and   r4 = 0xA0
    p[4]  = enc_f3(2'b10, 5'd5,  6'h05, 5'd3, 0, 13'd4);      // andn  r5 = 0xFFFFFF00
    p[5]  = enc_f3(2'b10, 5'd6,  6'h02, 5'd4, 1, 13'h5);      // or    r6 = 0xA5
    p[6]  = enc_f3(2'b10, 5'd7,  6'h06, 5'd0, 0, 13'd6);      // orn   r7 = 0xFFFFFF5A
    p[7]  = enc_f3(2'b10, 5'd8,  6'h03, 5'd6, 0, 13'd4);      // xor   r8 = 0x05
    p[8]  = enc_f3(2'b10, 5'd9,  6'h07, 5'd8, 0, 13'd0);      // xnor  r9 = 0xFFFFFFFA
    p[9]  = enc_f3(2'b10, 5'd10, 6'h25, 5'd1, 1, 13'd3);      // sll   r10 = 0x60
    p[10] = enc_f3(2'b10, 5'd11, 6'h26, 5'd2, 1, 13'd28);     // srl   r11 = 0xF
    p[11] = enc_f3(2'b10, 5'd12, 6'h27, 5'd2, 1, 13'd2);      // sra   r12 = 0xFFFFFFFE
    p[12] = enc_f3(2'b11, 5'd10, 6'h04, 5'd1, 1, 13'd4);      // st    r10 -> [16]
    p[13] = enc_f3(2'b11, 5'd13, 6'h00, 5'd0, 1, 13'd16);     // ld    r13 <- [16] = 0x60
    p[14] = enc_call(30'd2);                                  // call  +2
    p[15] = enc_f3(2'b10, 5'd31, 6'h00, 5'd0, 1, 13'd1);      //   skipped
    p[16] = enc_f3(2'b10, 5'd0,  6'h14, 5'd1, 0, 13'd1);      // subcc r0 = 12-12: z
    p[17] = enc_bicc(4'h1, 22'd2);                            // be    +2 (taken)
    p[18] = enc_f3(2'b10, 5'd31, 6'h00, 5'd0, 1, 13'd2);      //   skipped
    p[19] = enc_f3(2'b10, 5'd0,  6'h14, 5'd0, 0, 13'd1);      // subcc r0 = 0-12: n, c
    p[20] = enc_bicc(4'h5, 22'd2);                            // bcs   +2 (taken)
    p[21] = enc_f3(2'b10, 5'd31, 6'h00, 5'd0, 1, 13'd3);      //   skipped
    p[22] = enc_bicc(4'h6, 22'd2);                            // bneg  +2 (taken)
    p[23] = enc_f3(2'b10, 5'd31, 6'h00, 5'd0, 1, 13'd4);      //   skipped
    p[24] = enc_f3(2'b10, 5'd14, 6'h26, 5'd9, 1, 13'd1);      // srl   r14 = 0x7FFFFFFD
    p[25] = enc_f3(2'b10, 5'd0,  6'h10, 5'd14, 1, 13'd16);    // addcc r0 = 0x8000000D: n, v
    p[26] = enc_bicc(4'h7, 22'd2);                            // bvs   +2 (taken)
    p[27] = enc_f3(2'b10, 5'd31, 6'h00, 5'd0, 1, 13'd5);      //   skipped
    p[28] = enc_call(30'd0);                                  // call  0 (stay)
    for (int k = 0; k < 256; k++) dut.u_rom.mem[k] = (k < 29) ? p[k] : 32'h0;
    for (int k = 0; k < 256; k++) dut.u_ram.mem[k] = 32'h0;

    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk) en = 1;
    last = -1;
    foreach (path[n]) begin
      while (state != 3'(S_WB)) @(negedge clk);
      chk(pc == 32'(4 * path[n]), $sformatf("instruction %0d at word %0d (pc=%h)", n, path[n], pc));
      if (last >= 0) chk(cyc - last == 5, "five cycles per instruction");
      last = cyc;
      if (path[n] == 16) chk(psr[23:20] == 4'b0100, "subcc equal: z");
      if (path[n] == 19) chk(psr[23:20] == 4'b1001, "subcc 0-12: n and c");
      if (path[n] == 25) chk(psr[23:20] == 4'b1010, "addcc overflow: n and v");
      @(negedge clk);
    end
    chk(R(1)  == 32'd12,        "ADD");
    chk(R(2)  == 32'hFFFFFFF8,  "SUB");
    chk(R(3)  == 32'hFFFFFFA0,  "UMUL low word");
    chk(y     == 32'd11,        "UMUL high word in Y");
    chk(R(4)  == 32'h000000A0,  "AND");
    chk(R(5)  == 32'hFFFFFF00,  "ANDN");
    chk(R(6)  == 32'h000000A5,  "OR");
    chk(R(7)  == 32'hFFFFFF5A,  "ORN");
    chk(R(8)  == 32'h00000005,  "XOR");
    chk(R(9)  == 32'hFFFFFFFA,  "XNOR");
    chk(R(10) == 32'h00000060,  "SLL");
    chk(R(11) == 32'h0000000F,  "SRL");
    chk(R(12) == 32'hFFFFFFFE,  "SRA");
    chk(dut.u_ram.mem[4] == 32'h60, "ST");
    chk(R(13) == 32'h00000060,  "LD");
    chk(R(14) == 32'h7FFFFFFD,  "SRL r14");
    chk(R(31) == 32'h0,         "CALL, BE, BCS, BNEG, BVS skipped their next word");
    chk(R(0)  == 32'h0,         "r0 stays zero");
    chk(pc == 32'd112,          "stays on the final call");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
