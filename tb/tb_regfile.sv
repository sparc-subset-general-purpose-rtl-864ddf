// tb_regfile: self-checking test of the register file.
//
// Random writes and reads against a model array: r0 must stay zero, each
// read port must return zero while its enable is low, writes land only with
// we high, Y is written only with y_we, and reset clears everything.
`timescale 1ns/1ps
module tb_regfile;
  logic        clk = 0, rst = 1;
  logic        en_rs1, en_rs2, en_rd, we, y_we;
  logic [4:0]  rs1, rs2, rd, waddr;
  logic [31:0] rs1_data, rs2_data, rd_data, wdata, y_wdata, y;
  logic [31:0] model [32];
  logic [31:0] ymodel;
  int checks = 0, failures = 0;

  regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    en_rs1 = 0; en_rs2 = 0; en_rd = 0; we = 0; y_we = 0;
    rs1 = 0; rs2 = 0; rd = 0; waddr = 0; wdata = 0; y_wdata = 0;
    @(posedge clk); #1 rst = 0;
    foreach (model[k]) model[k] = 0;
    ymodel = 0;
    for (int k = 0; k < 32; k++) begin
      rs1 = 5'(k); en_rs1 = 1; #1;
      chk(rs1_data == 0, "cleared by reset");
    end
    repeat (2000) begin
      @(negedge clk);
      we = $urandom_range(0, 1); waddr = 5'($urandom); wdata = $urandom;
      y_we = ($urandom_range(0, 3) == 0); y_wdata = $urandom;
      en_rs1 = $urandom_range(0, 3) != 0; en_rs2 = $urandom_range(0, 3) != 0;
      en_rd = $urandom_range(0, 3) != 0;
      rs1 = 5'($urandom); rs2 = 5'($urandom); rd = 5'($urandom);
      #1;
      chk(rs1_data == (en_rs1 ? model[rs1] : 0), "rs1 port");
      chk(rs2_data == (en_rs2 ? model[rs2] : 0), "rs2 port");
      chk(rd_data  == (en_rd  ? model[rd]  : 0), "rd port");
      chk(y == ymodel, "Y");
      @(posedge clk);
      if (we && waddr != 0) model[waddr] = wdata;
      if (y_we) ymodel = y_wdata;
    end
    @(negedge clk);
    we = 1; waddr = 0; wdata = 32'hDEADBEEF; @(negedge clk);
    en_rs1 = 1; rs1 = 0; #1; chk(rs1_data == 0, "r0 ignores writes");
    we = 0; rst = 1; @(negedge clk); rst = 0;
    en_rs1 = 1; for (int k = 0; k < 32; k++) begin rs1 = 5'(k); #1; chk(rs1_data == 0, "reset clears"); end
    chk(y == 0, "reset clears Y");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
