// modified_tap -- IEEE 1149.1 TAP controller with the late UpdateDR block
// built in, so that EXTEST can test interconnect delay faults.
//
// With a standard TAP the pattern launched by UpdateDR reaches the input
// cells 2.5 TCK (falling-edge update) before CaptureDR samples them, far too
// long to see a slow net. Here the UpdateDR the boundary cells receive
// (selected_update_*) is the standard one for every instruction except
// EXTEST, for which it is the 1.5-clock-late version from late_update_gen.
// The launch then happens on the clock edge that enters Capture-DR, and the
// capture one clock later. Nothing else of the TAP changes, so the design
// stays within the standard: swapping this block for a plain TAP is the
// whole modification.
//
// Contents: the state machine (tap_fsm), the two-bit instruction register
// with decode and mode generation (tap_ir), a one-bit bypass register, the
// late UpdateDR block, the UpdateDR selector and the TDO stage.
//
// Boundary cells can be wired two ways and both are served:
//   * synchronous cells: update stage clocked by clk and enabled by the
//     level selected_update_dr; capture stage enabled by sync_capture_en;
//   * asynchronous cells: update stage clocked by the pulse
//     selected_update_clk (standard: rises on the falling edge in
//     Update-DR; EXTEST: rises 1.5 clocks later).
// clock_dr is the standard gated ClockDR (low during the second half of
// Capture-DR and Shift-DR, so it rises on the edge that ends them).
//
// TDO and TDO-enable change on the falling edge, as the standard requires.
// so is the serial output of the boundary scan register; bypass_sel forces
// the bypass register onto TDO whatever the instruction (an input of the
// published block diagram) and then also keeps the boundary register from
// capturing, shifting and updating. The port set follows the published block
// diagram of the modified TAP.
module modified_tap
  import bscan_pkg::*;
(
  input  logic                clk,        // selected test clock
  input  logic                trst_n,
  input  logic                tms,
  input  logic                tdi,
  input  logic                so,         // boundary scan register serial out
  input  logic                bypass_sel,
  input  logic [IR_WIDTH-1:0] sentinel,
  output logic                tdo,
  output logic                tdo_en,
  output logic [15:0]         tap_state,
  output logic                extest,
  output logic                samp_load,
  output logic                mode_in,
  output logic                mode_out,
  output logic                shift_dr,
  output logic                sync_capture_en,
  output logic                clock_dr,
  output logic                update_dr_tap,       // standard level
  output logic                selected_update_dr,  // level, synchronous cells
  output logic                selected_update_clk  // pulse, asynchronous cells
);

  tap_state_e state;
  logic       ir_so, bsr_sel, bsr_active, bypass_q;
  logic       late_update_dr, late_update_clk, update_dr_clk_std;
  instr_e     instr;

  tap_fsm u_fsm (
    .clk, .trst_n, .tms, .state, .tap_state
  );

  tap_ir u_ir (
    .clk, .trst_n, .state, .tdi, .sentinel, .ir_so, .instr,
    .extest, .samp_load, .bsr_sel, .mode_in, .mode_out
  );

  late_update_gen u_late (
    .clk, .trst_n, .update_dr_tap, .late_update_dr, .late_update_clk
  );

  assign shift_dr        = (state == SHIFT_DR);
  assign update_dr_tap   = (state == UPDATE_DR);
  // The boundary register takes part in a scan only when it is the selected
  // data register (EXTEST or SAMPLE/PRELOAD, and bypass_sel low).
  assign bsr_active      = bsr_sel && !bypass_sel;
  assign sync_capture_en = bsr_active && (state == CAPTURE_DR || state == SHIFT_DR);

  // Standard asynchronous UpdateDR: the low phase of clk within Update-DR.
  assign update_dr_clk_std = ~clk & update_dr_tap;

  // UpdateDR selection: late only under EXTEST.
  assign selected_update_dr  = bsr_active && (extest ? late_update_dr  : update_dr_tap);
  assign selected_update_clk = bsr_active && (extest ? late_update_clk : update_dr_clk_std);

  // Standard ClockDR: follows clk in Capture-DR and Shift-DR, high
  // elsewhere. The state only changes while clk is high, so the gate
  // cannot glitch.
  assign clock_dr = clk | ~(state == CAPTURE_DR || state == SHIFT_DR);

  // Bypass register: captures 0, shifts TDI.
  always_ff @(posedge clk or negedge trst_n) begin
    if (!trst_n)                 bypass_q <= 1'b0;
    else if (state == CAPTURE_DR) bypass_q <= 1'b0;
    else if (state == SHIFT_DR)   bypass_q <= tdi;
  end

  // TDO stage.
  always_ff @(negedge clk or negedge trst_n) begin
    if (!trst_n) begin
      tdo    <= 1'b0;
      tdo_en <= 1'b0;
    end else begin
      tdo_en <= (state == SHIFT_IR) || (state == SHIFT_DR);
      if (state == SHIFT_IR)
        tdo <= ir_so;
      else if (state == SHIFT_DR)
        tdo <= bsr_active ? so : bypass_q;
    end
  end

endmodule
