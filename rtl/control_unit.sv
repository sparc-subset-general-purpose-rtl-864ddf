// control_unit: the processor's control unit - FSM plus decoder.
//
// The FSM (control_fsm) steps through Idle and the five steps T0..T4; the
// decoder (control_dec) turns the present step and the instruction fields
// op, op2, op3 and i (read from IR by the decode unit) into the control
// signals for the datapath. Outputs are combinational from the state and
// IR, so they are valid for the whole clock cycle of their step. The
// FSM-into-decoder structure and the inputs op, op2, op3, clock, reset and
// enable follow the design's control-unit diagram; the i input is added
// because en_rs2 depends on it.
module control_unit
  import sparc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [1:0] op,
  input  logic [2:0] op2,
  input  logic [5:0] op3,
  input  logic       i,
  output state_t     state,
  output ctrl_t      ctrl
);
  control_fsm u_fsm (
    .clk  (clk),
    .rst  (rst),
    .en   (en),
    .state(state)
  );

  control_dec u_dec (
    .state(state),
    .op   (op),
    .op2  (op2),
    .op3  (op3),
    .i    (i),
    .ctrl (ctrl)
  );
endmodule
