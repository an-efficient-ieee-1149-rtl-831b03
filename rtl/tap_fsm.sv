// tap_fsm -- IEEE 1149.1 TAP controller state machine.
//
// The 16-state machine steps on every rising edge of clk, following TMS
// through the state diagram of the standard (next-state table in
// bscan_pkg::tap_next). trst_n resets it asynchronously to Test-Logic-Reset;
// five clocks with TMS high reach the same state from anywhere.
//
// In the at-speed design clk is the selected test clock: TCK normally, the
// system clock while an EXTEST launch/capture is in progress. The state
// machine itself is the standard one; only its clock and the UpdateDR signal
// built from it are changed elsewhere.
//
// Interface: state (enum) and tap_state (16-bit one-hot, bit i = state i).
module tap_fsm
  import bscan_pkg::*;
(
  input  logic        clk,
  input  logic        trst_n,
  input  logic        tms,
  output tap_state_e  state,
  output logic [15:0] tap_state
);

  always_ff @(posedge clk or negedge trst_n) begin
    if (!trst_n) state <= TEST_LOGIC_RESET;
    else         state <= tap_next(state, tms);
  end

  always_comb begin
    tap_state = '0;
    tap_state[state] = 1'b1;
  end

endmodule
