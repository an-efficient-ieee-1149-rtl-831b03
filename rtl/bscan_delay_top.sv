// bscan_delay_top -- IEEE 1149.1 boundary scan for a chip, able to test the
// delay of the nets between chips at system clock speed with EXTEST.
//
// Blocks: the modified TAP (standard TAP plus the late UpdateDR block),
// the clock selector, and the boundary scan register around the core. The
// core itself is not part of this design: its inputs (core_in) and
// outputs (core_out) are ports.
//
// An EXTEST delay test runs as follows. The pattern is shifted into the
// boundary register on TCK. On Exit1-DR the clock selector moves the TAP and
// the cells onto sys_clk (if at_speed_en is set). The output cells launch the
// pattern on the edge that enters Capture-DR (the late UpdateDR), the input
// cells capture the far ends of the nets on the next edge, and the TAP
// returns to TCK in Shift-DR, where the responses are shifted out on TDO.
// A net slower than one sys_clk period shows its old value. With
// at_speed_en low the same sequence runs on TCK and the launch-to-capture
// time is one TCK period; without EXTEST the update timing is the
// standard one.
//
// ASYNC_CELLS selects how the cells' update stage is wired: 0 (default),
// synchronous -- clocked by the test clock, enabled by the UpdateDR level;
// 1, asynchronous -- clocked by the UpdateDR pulse. The launch-to-capture
// time under EXTEST is one clock either way. N_IN and N_OUT default to the
// two-input, one-output sample chip of the published design.
module bscan_delay_top
  import bscan_pkg::*;
#(
  parameter int unsigned N_IN        = 2,
  parameter int unsigned N_OUT       = 1,
  parameter bit          ASYNC_CELLS = 1'b0
) (
  input  logic                tck,
  input  logic                sys_clk,
  input  logic                at_speed_en,
  input  logic                trst_n,
  input  logic                tms,
  input  logic                tdi,
  input  logic                bypass_sel,
  input  logic [IR_WIDTH-1:0] sentinel,
  output logic                tdo,
  output logic                tdo_en,
  output logic                extest,
  output logic                samp_load,
  output logic [15:0]         tap_state,
  output logic                bs_clk,
  output logic                sys_selected,  // bs_clk is running on sys_clk
  output logic                clock_dr,
  output logic                update_dr,     // UpdateDR as the cells see it
  input  logic [N_IN-1:0]     pin_in,
  output logic [N_OUT-1:0]    pin_out,
  output logic [N_IN-1:0]     core_in,
  input  logic [N_OUT-1:0]    core_out
);

  logic mode_in, mode_out, shift_dr, sync_capture_en;
  logic update_dr_tap, selected_update_dr, selected_update_clk;
  logic bsr_so;
  logic cell_update_clk, cell_update_en;

  clock_select u_clksel (
    .tck, .sys_clk, .trst_n, .at_speed_en, .tap_state, .extest, .shift_dr,
    .bs_clk, .sys_selected
  );

  modified_tap u_tap (
    .clk (bs_clk), .trst_n, .tms, .tdi,
    .so (bsr_so), .bypass_sel, .sentinel,
    .tdo, .tdo_en, .tap_state, .extest, .samp_load, .mode_in, .mode_out,
    .shift_dr, .sync_capture_en, .clock_dr, .update_dr_tap,
    .selected_update_dr, .selected_update_clk
  );

  if (ASYNC_CELLS) begin : g_async
    assign cell_update_clk = selected_update_clk;
    assign cell_update_en  = 1'b1;
    assign update_dr       = selected_update_clk;
  end else begin : g_sync
    assign cell_update_clk = bs_clk;
    assign cell_update_en  = selected_update_dr;
    assign update_dr       = selected_update_dr;
  end

  bs_chain #(.N_IN(N_IN), .N_OUT(N_OUT)) u_bsr (
    .capture_clk (bs_clk),
    .update_clk  (cell_update_clk),
    .capture_en  (sync_capture_en),
    .update_en   (cell_update_en),
    .shift_dr,
    .mode_in, .mode_out,
    .si (tdi), .so (bsr_so),
    .pin_in, .core_in, .core_out, .pin_out
  );

endmodule
