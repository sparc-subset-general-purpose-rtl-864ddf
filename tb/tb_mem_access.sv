// tb_mem_access: self-checking test of the memory-access unit.
//
// Connects the unit to a small model memory and plays load and store
// sequences step by step (MDR2 in T1, MAR in T2, the RAM access in T3,
// data_out in T4), checking the RAM address, write data and strobe, the
// loaded word and the data_out multiplexer.
`timescale 1ns/1ps
module tb_mem_access;
  logic        clk = 0, rst = 1;
  logic        en_mar, en_mdr, en_mdr2, en_ram, wr_ram, sel_mdr;
  logic [31:0] addr_in, store_in, exe_in, ram_addr, ram_wdata, ram_rdata, data_out;
  logic        ram_en, ram_we;
  logic [31:0] mem [16];
  int checks = 0, failures = 0;

  mem_access dut (.*);
  always #5 clk = ~clk;
  assign ram_rdata = ram_en ? mem[ram_addr[5:2]] : 32'h0;
  always_ff @(posedge clk) if (ram_en && ram_we) mem[ram_addr[5:2]] <= ram_wdata;

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
    logic [31:0] a, d, e, model [16];
    logic        st;
    {en_mar, en_mdr, en_mdr2, en_ram, wr_ram, sel_mdr} = '0;
    addr_in = 0; store_in = 0; exe_in = 0;
    foreach (mem[k]) begin mem[k] = 32'(k); model[k] = 32'(k); end
    @(posedge clk); #1 rst = 0;
    repeat (1000) begin
      st = $urandom_range(0, 1);
      a = {26'($urandom), 4'($urandom), 2'b00} & 32'h3C;
      d = $urandom; e = $urandom;
      // T1
      @(negedge clk); en_mdr2 = st; store_in = d;
      // T2
      @(negedge clk); en_mdr2 = 0; store_in = $urandom; en_mar = 1; addr_in = a;
      // T3
      @(negedge clk); en_mar = 0; addr_in = $urandom; en_ram = 1; wr_ram = st; en_mdr = !st;
      #1;
      chk(ram_addr == a, "MAR");
      chk(ram_we == st, "write strobe");
      if (st) chk(ram_wdata == d, "MDR2");
      // T4
      @(negedge clk); en_ram = 0; wr_ram = 0; en_mdr = 0; exe_in = e; sel_mdr = !st;
      #1;
      if (st) begin
        model[a[5:2]] = d;
        chk(mem[a[5:2]] == d, "stored word");
        chk(data_out == e, "data_out forwards the execute result");
      end else begin
        chk(data_out == model[a[5:2]], "data_out is the loaded word");
      end
      sel_mdr = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
