// tb_decode_unit: self-checking test of the decode unit.
//
// For random instruction words of every format it checks the field outputs,
// and after an en_dec edge the latched opr1, opr2 (register or sign-extended
// immediate), rd_out, and the PC-relative decision: CALL always taken with
// disp30 * 4, Bicc taken by its condition against random icc with the
// sign-extended disp22 * 4, anything else not taken. With en_dec low the
// latched values must hold.
`timescale 1ns/1ps
module tb_decode_unit;
  logic        clk = 0, rst = 1, en_dec;
  logic [31:0] ir, rs1_data, rs2_data, opr1, opr2, disp;
  logic [3:0]  icc;
  logic [1:0]  op;
  logic [2:0]  op2;
  logic [5:0]  op3;
  logic        i, take;
  logic [4:0]  rs1, rs2, rd, rd_out;
  int checks = 0, failures = 0;
  int n_taken = 0;

  decode_unit dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s ir=%h icc=%b", s, ir, icc); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] eo2, ed;
    logic        et;
    en_dec = 0; ir = 0; rs1_data = 0; rs2_data = 0; icc = 0;
    @(posedge clk); #1 rst = 0;
    repeat (3000) begin
      @(negedge clk);
      ir = $urandom;
      if ($urandom_range(0, 2) == 0) ir[24:22] = 3'b010;   // more Bicc
      rs1_data = $urandom; rs2_data = $urandom; icc = 4'($urandom);
      en_dec = 1;
      #1;
      chk(op == ir[31:30] && rd == ir[29:25] && op2 == ir[24:22] && op3 == ir[24:19] &&
          rs1 == ir[18:14] && i == ir[13] && rs2 == ir[4:0], "fields");
      eo2 = ir[13] ? 32'($signed(ir[12:0])) : rs2_data;
      et = 0; ed = 0;
      if (ir[31:30] == 2'b01) begin
        et = 1; ed = ir << 2;
      end else if (ir[31:30] == 2'b00 && ir[24:22] == 3'b010) begin
        ed = 32'($signed(ir[21:0])) * 4;
        case (ir[28:25])
          4'd1: et = icc[2];
          4'd5: et = icc[0];
          4'd6: et = icc[3];
          4'd7: et = icc[1];
          default: et = 0;
        endcase
      end
      @(negedge clk);
      en_dec = 0;
      chk(opr1 == rs1_data, "opr1");
      chk(opr2 == eo2, "opr2");
      chk(rd_out == ir[29:25], "rd_out");
      chk(take == et, "take");
      if (et) begin chk(disp == ed, "disp"); n_taken++; end
      ir = $urandom; rs1_data = $urandom;
      @(negedge clk);
      chk(take == et && (!et || disp == ed), "hold while en_dec low");
    end
    chk(n_taken > 100, "taken transfers seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
