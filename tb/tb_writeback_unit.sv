// tb_writeback_unit: self-checking test of the write-back unit.
//
// Exhausts the three enables with random data and register numbers and
// checks that a register write is requested only with en_wb and en_wrt
// both high, a Y write only with en_wb and wr_y, and that address and data
// pass to the register file.
`timescale 1ns/1ps
module tb_writeback_unit;
  logic        en_wb, en_wrt, wr_y, rf_we, y_we;
  logic [4:0]  rd, rf_waddr;
  logic [31:0] data_in, hi_in, rf_wdata, y_wdata;
  int checks = 0, failures = 0;

  writeback_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) begin
      for (int m = 0; m < 8; m++) begin
        {en_wb, en_wrt, wr_y} = 3'(m);
        rd = 5'($urandom); data_in = $urandom; hi_in = $urandom;
        #1;
        checks++;
        if (rf_we !== (m[2] & m[1]) || y_we !== (m[2] & m[0]) ||
            rf_waddr !== rd || rf_wdata !== data_in || y_wdata !== hi_in) begin
          failures++;
          $display("FAIL enables=%b", 3'(m));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
