// control_fsm: the six-state sequencer of the control unit.
//
// States Idle, Fetch (T0), Decode (T1), Execute (T2), Memory (T3) and
// Write Back (T4). From Idle the FSM moves to Fetch when en is high and
// otherwise waits. Once started it steps Fetch -> Decode -> Execute ->
// Memory -> Write Back -> Fetch on every clock, whatever en does, so every
// instruction takes five cycles. rst forces the next state to Idle from any
// state (synchronous). The states, the en and rst transitions and the
// Write Back -> Fetch loop follow the design's state diagram; that en is
// only sampled in Idle is this implementation's reading of it.
module control_fsm
  import sparc_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   en,
  output state_t state
);
  state_t nxt;

  always_comb begin
    unique case (state)
      S_IDLE:    nxt = en ? S_FETCH : S_IDLE;
      S_FETCH:   nxt = S_DECODE;
      S_DECODE:  nxt = S_EXECUTE;
      S_EXECUTE: nxt = S_MEMORY;
      S_MEMORY:  nxt = S_WB;
      S_WB:      nxt = S_FETCH;
      default:   nxt = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= S_IDLE;
    else     state <= nxt;
  end
endmodule
