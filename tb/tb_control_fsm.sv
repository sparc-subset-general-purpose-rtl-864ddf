// tb_control_fsm: self-checking test of the control FSM.
//
// Checks that the FSM waits in Idle while en is low, leaves for Fetch when
// en rises, then steps Fetch, Decode, Execute, Memory, Write Back and back
// to Fetch on every clock whatever en does, and that rst returns it to Idle
// from every state.
`timescale 1ns/1ps
module tb_control_fsm;
  import sparc_pkg::*;
  logic   clk = 0, rst = 1, en = 0;
  state_t state;
  int checks = 0, failures = 0;

  control_fsm dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s state=%s", s, state.name()); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    state_t seq [5] = '{S_FETCH, S_DECODE, S_EXECUTE, S_MEMORY, S_WB};
    @(negedge clk); rst = 0;
    chk(state == S_IDLE, "reset to Idle");
    repeat (5) begin @(negedge clk); chk(state == S_IDLE, "waits for en"); end
    for (int stop = 0; stop < 5; stop++) begin
      en = 1;
      @(negedge clk);
      en = $urandom_range(0, 1);
      for (int c = 0; c < 12 + stop; c++) begin
        chk(state == seq[c % 5], "five-step cycle");
        @(negedge clk);
        en = $urandom_range(0, 1);
      end
      // the FSM is now in seq[(12 + stop) % 5]
      rst = 1; @(negedge clk); rst = 0; en = 0;
      chk(state == S_IDLE, "rst forces Idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
