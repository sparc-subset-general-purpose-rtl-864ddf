// tb_ram: self-checking test of the data RAM.
//
// Random accesses against a model array: a write lands at the clock edge
// only when en and we are both high, a read shows the stored word while en
// is high and zero while en is low, and the index wraps at WORDS.
`timescale 1ns/1ps
module tb_ram;
  localparam int W = 64;
  logic        clk = 0, en, we;
  logic [31:0] addr, wdata, rdata;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  ram #(.WORDS(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; we = 1;
    for (int k = 0; k < W; k++) begin
      @(negedge clk); addr = 32'(4 * k); wdata = 32'(k) * 32'h01010101; model[k] = wdata;
    end
    repeat (3000) begin
      @(negedge clk);
      en = $urandom_range(0, 3) != 0; we = $urandom_range(0, 1);
      addr = $urandom; wdata = $urandom;
      #1;
      chk(rdata == (en ? model[addr[7:2]] : 32'h0), "read");
      @(posedge clk);
      if (en && we) model[addr[7:2]] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
