// modified_tap_tb -- drives the modified TAP through TMS/TDI like a board
// tester, with a three-bit boundary register modelled in the testbench on
// its so input. Checks the IR capture value and TDO enable, BYPASS, the
// register select and mode outputs, the ClockDR pulses, and above all the
// UpdateDR timing: standard for SAMPLE/PRELOAD (level in Update-DR, pulse
// rising at its falling edge, 2.5 clocks before the capture edge) and
// 1.5 clocks later for EXTEST (pulse rising 1 clock before the capture).
`timescale 1ns/1ps
module modified_tap_tb;
  import bscan_pkg::*;
  localparam realtime P = 100.0;

  logic clk = 1'b0, trst_n = 1'b0, tms = 1'b1, tdi = 1'b0, bypass_sel = 1'b0;
  logic [1:0] sentinel = 2'b01;
  logic so, tdo, tdo_en, extest, samp_load, mode_in, mode_out, shift_dr;
  logic sync_capture_en, clock_dr, update_dr_tap, selected_update_dr, selected_update_clk;
  logic [15:0] tap_state;
  logic [2:0] bsr, capt = 3'b101;
  int checks = 0, failures = 0, n_clock_dr = 0, n_cs_states = 0;
  realtime t_tap, t_sel_lvl, t_sel_clk, t_cap;

  modified_tap dut (.clk, .trst_n, .tms, .tdi, .so, .bypass_sel, .sentinel, .tdo, .tdo_en,
    .tap_state, .extest, .samp_load, .mode_in, .mode_out, .shift_dr, .sync_capture_en,
    .clock_dr, .update_dr_tap, .selected_update_dr, .selected_update_clk);

  always #(P/2) clk = ~clk;

  // Boundary register model: capture capt, shift TDI in at bit 2, so = bit 0.
  always @(posedge clk) if (sync_capture_en) bsr <= shift_dr ? {tdi, bsr[2:1]} : capt;
  assign so = bsr[0];

  always @(posedge update_dr_tap)      t_tap     = $realtime;
  always @(posedge selected_update_dr) t_sel_lvl = $realtime;
  always @(posedge selected_update_clk) t_sel_clk = $realtime;
  always @(posedge clk) begin
    if (tap_state[CAPTURE_DR]) t_cap = $realtime;
    if (tap_state[CAPTURE_DR] || tap_state[SHIFT_DR]) n_cs_states++;
  end
  always @(posedge clock_dr) n_clock_dr++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  task automatic step(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    @(posedge clk);
    o = tdo;
    check(tdo_en == (tap_state[SHIFT_DR] || tap_state[SHIFT_IR]), "TDO enable");
    @(negedge clk);
  endtask
  task automatic step0(input logic m);
    logic o;
    step(m, 1'b0, o);
  endtask
  task automatic load_ir(input logic [1:0] code, output logic [1:0] cap);
    logic o;
    step0(1); step0(1); step0(0); step0(0);
    for (int k = 0; k < 2; k++) begin step(k == 1, code[k], o); cap[k] = o; end
    step0(1); step0(0);
  endtask
  task automatic scan_dr(input int len, input logic [7:0] din, output logic [7:0] dout);
    logic o;
    step0(1); step0(0); step0(0);
    for (int k = 0; k < len; k++) begin step(k == len - 1, din[k], o); dout[k] = o; end
  endtask
  // Exit1-DR -> Update-DR -> Select-DR -> Capture-DR -> Shift-DR, then the
  // times are taken, then Exit1 -> Update -> Idle.
  realtime u_tap, u_lvl, u_clk, u_cap;
  task automatic update_capture();
    step0(1); step0(1); step0(0); step0(0);
    u_tap = t_tap; u_lvl = t_sel_lvl; u_clk = t_sel_clk; u_cap = t_cap;
    step0(1); step0(1); step0(0);
  endtask

  logic [1:0] irc;
  logic [7:0] dout;

  initial begin
    #(P * 2000);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(P * 1.3) trst_n = 1'b1;
    @(negedge clk);
    step0(1); step0(0);
    check(!extest && !samp_load && !mode_in && !mode_out, "reset instruction is BYPASS");
    // BYPASS
    scan_dr(4, 8'b0000_1101, dout);
    step0(1); step0(0);
    check(dout[0] == 1'b0 && dout[3:1] == 3'b101, "bypass register");
    // SAMPLE/PRELOAD, standard update timing
    load_ir(INSTR_SAMPLE, irc);
    check(irc == 2'b01, "IR capture value");
    check(samp_load && !extest && !mode_out && !mode_in, "SAMPLE decode and modes");
    scan_dr(3, 8'b0000_0110, dout);
    check(dout[2:0] == capt, "boundary register shifted out");
    update_capture();
    check(u_lvl == u_tap, "SAMPLE: selected level is the TAP UpdateDR");
    check(u_clk == u_tap + 0.5 * P, "SAMPLE: update pulse on the falling edge");
    check(u_cap - u_clk == 2.5 * P, "SAMPLE: 2.5 clocks from update to capture");
    // EXTEST, late update
    load_ir(INSTR_EXTEST, irc);
    check(extest && mode_out && mode_in, "EXTEST decode and modes");
    scan_dr(3, 8'b0000_0011, dout);
    update_capture();
    check(u_lvl == u_tap + 1.5 * P, "EXTEST: level 1.5 clocks late");
    check(u_clk == u_tap + 2.0 * P, "EXTEST: pulse rises on the Capture-DR entry edge");
    check(u_cap - u_clk == 1.0 * P, "EXTEST: 1 clock from update to capture");
    // bypass_sel forces the bypass register
    bypass_sel = 1'b1;
    scan_dr(4, 8'b0000_1011, dout);
    step0(1); step0(0);
    check(dout[0] == 1'b0 && dout[3:1] == 3'b011, "bypass_sel");
    bypass_sel = 1'b0;
    check(n_clock_dr == n_cs_states, "one ClockDR pulse per Capture-DR/Shift-DR clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
