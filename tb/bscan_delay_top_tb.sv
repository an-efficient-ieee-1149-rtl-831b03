// bscan_delay_top_tb -- end-to-end test of the boundary scan design at its
// default size (two input cells, one output cell, synchronous cells).
//
// A board tester drives TMS/TDI after each falling edge of the boundary scan
// clock and reads TDO at each rising edge; during the at-speed window it
// follows the system clock, as a tester aligned to the system clock would.
// The chip's output pin 0 is wired back to input pin 0 through a board net
// modelled as a transport delay (net_delay); input pin 1 is driven by the
// tester. The core is modelled as core_out[0] = ~core_in[1].
//
// Sequence: reset and BYPASS, IR capture value, SAMPLE/PRELOAD with the
// standard update timing (2 TCK from update to capture), EXTEST static test
// on TCK with the late update (1 TCK), at-speed EXTEST with a fast net
// (captured correctly, 1 system clock from launch to capture), the same
// with a slow net (delay fault seen), the slow net again on TCK (passes),
// bypass_sel forcing the bypass register, and return to Test-Logic-Reset.
// Every mechanism is counted and a mechanism that never happened is a
// failure.
`timescale 1ns/1ps
module bscan_delay_top_tb;
  import bscan_pkg::*;

  localparam int N_IN = 2, N_OUT = 1, N = N_IN + N_OUT;
  localparam realtime TCK_P = 100.0, SYS_P = 10.0;

  logic tck = 1'b0, sys_clk = 1'b0;
  logic at_speed_en = 1'b0, trst_n = 1'b0, tms = 1'b1, tdi = 1'b0, bypass_sel = 1'b0;
  logic [1:0] sentinel = 2'b01;
  logic tdo, tdo_en, extest, samp_load, bs_clk, sys_selected, clock_dr, update_dr;
  logic [15:0] tap_state;
  logic [N_IN-1:0] pin_in, core_in;
  logic [N_OUT-1:0] pin_out, core_out;
  logic net_far = 1'b0, pin_b = 1'b1;
  realtime net_delay = 4.0;

  int checks = 0, failures = 0;
  int n_ir_load = 0, n_bypass = 0, n_sample = 0, n_std_update = 0, n_late_tck = 0,
      n_at_speed = 0, n_delay_fault = 0, n_clk_switch = 0, n_bypass_sel = 0, n_tlr = 0;

  always #(TCK_P/2) tck = ~tck;
  initial begin
    #3;                       // keep system clock edges apart from TCK edges
    forever #(SYS_P/2) sys_clk = ~sys_clk;
  end

  bscan_delay_top dut (
    .tck, .sys_clk, .at_speed_en, .trst_n, .tms, .tdi, .bypass_sel, .sentinel,
    .tdo, .tdo_en, .extest, .samp_load, .tap_state, .bs_clk, .sys_selected,
    .clock_dr, .update_dr, .pin_in, .pin_out, .core_in, .core_out
  );

  // Board net and core model.
  logic pin0;
  assign pin0 = pin_out[0];
  always @(posedge pin0 or negedge pin0) net_far <= #(net_delay) pin0;
  assign pin_in   = {pin_b, net_far};
  assign core_out = ~core_in[1];

  // Time of the last update edge, capture edge and output pin change.
  realtime t_upd = 0, t_cap = 0, t_pin = 0;
  always @(posedge bs_clk) begin
    if (update_dr)                 t_upd = $realtime;
    if (tap_state[CAPTURE_DR])     t_cap = $realtime;
  end
  always @(posedge pin0 or negedge pin0) t_pin = $realtime;
  always @(posedge sys_selected) n_clk_switch++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  // One TAP step; starts and ends just after a falling edge of bs_clk.
  task automatic step(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    @(posedge bs_clk);
    o = tdo;
    @(negedge bs_clk);
  endtask

  task automatic step0(input logic m);
    logic o;
    step(m, 1'b0, o);
  endtask

  task automatic load_ir(input logic [1:0] code, output logic [1:0] captured);
    logic o;
    step0(1); step0(1); step0(0); step0(0);           // -> Shift-IR
    for (int k = 0; k < 2; k++) begin
      step(k == 1, code[k], o);
      captured[k] = o;
    end
    step0(1); step0(0);                                 // Update-IR -> Idle
    n_ir_load++;
  endtask

  // Idle -> Shift-DR
  task automatic goto_shift_dr();
    step0(1); step0(0); step0(0);
  endtask

  // Shift len bits (din[i] ends in chain cell i), ends in Exit1-DR.
  task automatic shift_dr(input int len, input logic [7:0] din, output logic [7:0] dout);
    logic o;
    dout = '0;
    for (int k = 0; k < len; k++) begin
      step(k == len - 1, din[len-1-k], o);
      dout[len-1-k] = o;
    end
  endtask

  task automatic update_to_idle();
    step0(1); step0(0);
  endtask

  // Exit1-DR -> Update-DR -> Select-DR-Scan -> Capture-DR -> Shift-DR
  task automatic update_capture();
    step0(1); step0(1); step0(0); step0(0);
  endtask

  logic [1:0] irc;
  logic [7:0] dout;
  logic       prev;

  initial begin
    #(TCK_P * 3000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TCK_P * 2.3) trst_n = 1'b1;
    @(negedge bs_clk);
    step0(1); step0(1); step0(1); step0(1); step0(1);
    check(tap_state[TEST_LOGIC_RESET], "test-logic-reset after TMS high");
    n_tlr++;
    step0(0);
    check(tap_state[RUN_TEST_IDLE], "run-test/idle");

    // BYPASS after reset: captured 0, then TDI delayed by one bit.
    goto_shift_dr();
    shift_dr(4, 8'b0000_1011, dout);
    update_to_idle();
    check(dout[3] == 1'b0, "bypass captures 0");
    check(dout[2:0] == 3'b101, "bypass shifts TDI through one flip-flop");
    n_bypass++;

    // SAMPLE/PRELOAD: IR capture gives the sentinel value.
    load_ir(INSTR_SAMPLE, irc);
    check(irc == sentinel, "IR capture value");
    check(samp_load && !extest, "SAMPLE/PRELOAD decoded");
    pin_b = 1'b1;
    #(TCK_P);
    goto_shift_dr();
    // preload: in0=0, in1=1, out0=1
    shift_dr(N, 8'b100 | 8'b010, dout);
    // captured: out0 = core_out = ~b = 0, in1 = b = 1, in0 = net = ~b = 0
    check(dout[2:0] == 3'b010, "SAMPLE captures pins and core outputs");
    n_sample++;
    update_capture();
    check(t_cap - t_upd == 2 * TCK_P, "standard update to capture = 2 TCK (synchronous cells)");
    check(pin_out[0] == 1'b0, "SAMPLE/PRELOAD leaves pins functional");
    n_std_update++;
    // Re-preload 110 and leave through Update-DR.
    shift_dr(N, 8'b110, dout);
    update_to_idle();

    // EXTEST: pins now come from the preloaded update stages.
    load_ir(INSTR_EXTEST, irc);
    check(extest, "EXTEST decoded");
    check(pin_out[0] == 1'b1, "EXTEST drives preloaded output value");
    check(core_in == 2'b10, "EXTEST isolates core with preloaded input values");

    // EXTEST on TCK, slow net (15 ns): late update, capture 1 TCK later.
    net_delay = 15.0;
    #(TCK_P);
    goto_shift_dr();
    prev = pin_out[0];
    shift_dr(N, {5'b0, ~prev, 2'b00}, dout);
    update_capture();
    check(t_cap - t_upd == TCK_P, "late update to capture = 1 TCK");
    check(t_pin == t_upd, "output pin launched by the late update");
    shift_dr(N, {5'b0, prev, 2'b00}, dout);   // response out, next pattern in
    check(dout[0] == ~prev, "slow net passes at TCK rate");
    check(dout[1] == pin_b, "input cell 1 captures pin");
    check(dout[2] == ~1'b0, "output cell captures core output");
    n_late_tck++;
    update_to_idle();

    // At-speed EXTEST, fast net (4 ns): captured within one system clock.
    at_speed_en = 1'b1;
    net_delay = 4.0;
    #(TCK_P);
    for (int r = 0; r < 2; r++) begin
      goto_shift_dr();
      prev = pin_out[0];
      shift_dr(N, {5'b0, ~prev, 2'b00}, dout);
      update_capture();
      check(t_cap - t_upd == SYS_P, "at-speed late update to capture = 1 system clock");
      check(t_pin == t_upd, "at-speed launch on the late update");
      shift_dr(N, {5'b0, ~prev, 2'b00}, dout);
      check(dout[0] == ~prev, "fast net passes at speed");
      update_to_idle();
      n_at_speed++;
    end

    // At-speed EXTEST, slow net (15 ns): old value captured -> delay fault.
    net_delay = 15.0;
    #(TCK_P);
    for (int r = 0; r < 2; r++) begin
      goto_shift_dr();
      prev = pin_out[0];
      shift_dr(N, {5'b0, ~prev, 2'b00}, dout);
      update_capture();
      check(t_cap - t_upd == SYS_P, "at-speed interval (slow net)");
      shift_dr(N, {5'b0, ~prev, 2'b00}, dout);
      check(dout[0] == prev, "slow net shows old value at speed");
      if (dout[0] == prev) n_delay_fault++;
      update_to_idle();
    end
    check(bs_clk == tck || !sys_selected, "clock returned to TCK");

    // bypass_sel forces the bypass register even under EXTEST.
    at_speed_en = 1'b0;
    bypass_sel = 1'b1;
    prev = pin_out[0];
    goto_shift_dr();
    shift_dr(4, {4'b0, ~prev, 3'b110}, dout);
    update_to_idle();
    check(dout[3] == 1'b0 && dout[2:0] == {~prev, 2'b11}, "bypass_sel selects bypass register");
    check(pin_out[0] == prev, "boundary register holds while bypassed");
    n_bypass_sel++;
    bypass_sel = 1'b0;

    // Back to Test-Logic-Reset: instruction returns to BYPASS.
    step0(1); step0(1); step0(1); step0(1); step0(1);
    check(tap_state[TEST_LOGIC_RESET] && !extest && !samp_load, "TMS reset restores BYPASS");
    n_tlr++;

    $display("mechanisms: ir_load=%0d bypass=%0d sample=%0d std_update=%0d late_update_tck=%0d at_speed=%0d delay_fault=%0d clock_switch=%0d bypass_sel=%0d tlr=%0d",
             n_ir_load, n_bypass, n_sample, n_std_update, n_late_tck, n_at_speed,
             n_delay_fault, n_clk_switch, n_bypass_sel, n_tlr);
    check(n_ir_load > 0, "IR load happened");
    check(n_bypass > 0, "bypass happened");
    check(n_sample > 0, "sample happened");
    check(n_std_update > 0, "standard update happened");
    check(n_late_tck > 0, "late update on TCK happened");
    check(n_at_speed > 0, "at-speed test happened");
    check(n_delay_fault > 0, "delay fault detected");
    check(n_clk_switch >= 4, "clock switched to system clock");
    check(n_bypass_sel > 0, "bypass_sel used");
    check(n_tlr > 1, "test-logic-reset reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
