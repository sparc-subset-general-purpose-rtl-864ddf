// tb_rom: self-checking test of the instruction ROM.
//
// Writes a known pattern into the array, then reads every word at its byte
// address and checks: the word shows while en is high, zero while en is
// low, the two low address bits are ignored and the index wraps at WORDS.
`timescale 1ns/1ps
module tb_rom;
  localparam int W = 64;
  logic        en;
  logic [31:0] addr, data;
  int checks = 0, failures = 0;

  rom #(.WORDS(W)) dut (.en(en), .addr(addr), .data(data));

  function automatic logic [31:0] pat(int k);
    return 32'h9E3779B9 * (k + 1);
  endfunction

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < W; k++) dut.mem[k] = pat(k);
    for (int k = 0; k < W; k++) begin
      en = 1; addr = 32'(4 * k) | 32'($urandom_range(0, 3)); #1;
      chk(data == pat(k), "read");
      en = 0; #1;
      chk(data == 0, "disabled reads zero");
      en = 1; addr = 32'(4 * (k + W)); #1;
      chk(data == pat(k), "wrap");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
