// clock_select -- switches the boundary scan clock from TCK to the system
// clock for the launch and capture of an EXTEST delay test.
//
// Shifting needs TCK, because the tester supplies TDI and takes TDO at TCK
// rate; only the interval from the launch (late UpdateDR) to the capture
// has to run at system speed. The window is told from the TAP state, the
// EXTEST decode and ShiftDR: under EXTEST the TAP states Exit1-DR, Update-DR,
// Select-DR-Scan and Capture-DR run on sys_clk, and the return to Shift-DR
// (or any other state) hands the clock back to TCK. at_speed_en lets the
// board run an EXTEST entirely on TCK; it is this design's addition.
//
// bs_clk, the clock of the TAP and of the boundary cells, is a glitch-free
// multiplexer: each source has an enable flip-flop that changes only on
// that source's falling edge, and each enable waits until the other one is
// off. The TAP enters Exit1-DR on a TCK rising edge; TCK is removed at its
// next falling edge and sys_clk enabled on a following falling edge of
// sys_clk, so no shortened pulse reaches bs_clk. Leaving the window works
// the same way in reverse. The two enables cross clock domains without
// synchronisers; a production netlist would add them.
//
// Timing: after entering Exit1-DR on TCK, the first sys_clk rising edge of
// bs_clk follows within half a TCK period plus one sys_clk period; the TAP
// then takes one sys_clk period per state, so the late update launched on
// entry to Capture-DR is captured exactly one sys_clk period later.
module clock_select
  import bscan_pkg::*;
(
  input  logic        tck,
  input  logic        sys_clk,
  input  logic        trst_n,
  input  logic        at_speed_en,
  input  logic [15:0] tap_state,
  input  logic        extest,
  input  logic        shift_dr,
  output logic        bs_clk,
  output logic        sys_selected
);

  logic want_sys, en_tck_q, en_sys_q;

  assign want_sys = at_speed_en && extest && !shift_dr &&
                    (tap_state[EXIT1_DR]       || tap_state[UPDATE_DR] ||
                     tap_state[SELECT_DR_SCAN] || tap_state[CAPTURE_DR]);

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) en_tck_q <= 1'b1;
    else         en_tck_q <= !want_sys && !en_sys_q;
  end

  always_ff @(negedge sys_clk or negedge trst_n) begin
    if (!trst_n) en_sys_q <= 1'b0;
    else         en_sys_q <= want_sys && !en_tck_q;
  end

  assign bs_clk       = (tck & en_tck_q) | (sys_clk & en_sys_q);
  assign sys_selected = en_sys_q;

endmodule
