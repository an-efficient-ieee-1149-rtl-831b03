// clock_select_tb -- checks the clock selector with a testbench model of the
// TAP state sequence: outside the window bs_clk is TCK; under EXTEST with
// at_speed_en the states Exit1-DR to Capture-DR run on the system clock;
// Shift-DR returns to TCK; without EXTEST or at_speed_en nothing switches.
// Every high and low phase of bs_clk is measured: none may be shorter than
// half a system clock period (no glitch).
`timescale 1ns/1ps
module clock_select_tb;
  import bscan_pkg::*;
  localparam realtime TP = 100.0, SP = 10.0;

  logic tck = 1'b0, sys_clk = 1'b0, trst_n = 1'b0, at_speed_en = 1'b1, extest = 1'b1;
  logic [15:0] tap_state;
  logic bs_clk, sys_selected;
  tap_state_e st = SHIFT_DR;
  int checks = 0, failures = 0, n_sys_edges = 0;
  realtime t_last = 0, min_phase = 1.0e9;

  assign tap_state = 16'h1 << st;

  clock_select dut (.tck, .sys_clk, .trst_n, .at_speed_en, .tap_state, .extest,
    .shift_dr(st == SHIFT_DR), .bs_clk, .sys_selected);

  always #(TP/2) tck = ~tck;
  initial begin #3; forever #(SP/2) sys_clk = ~sys_clk; end

  always @(bs_clk) begin
    if ($realtime > 200.0 && $realtime - t_last < min_phase) min_phase = $realtime - t_last;
    t_last = $realtime;
  end
  always @(posedge bs_clk) begin
    if (sys_selected) n_sys_edges++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  // One delay-test pass: Shift-DR -> Exit1 -> Update -> Select -> Capture -> Shift
  // stepped on bs_clk. Returns the period of the Update->Capture steps.
  task automatic pass(output realtime per);
    realtime t1;
    st = SHIFT_DR;
    @(posedge bs_clk); st <= EXIT1_DR;
    @(posedge bs_clk); st <= UPDATE_DR; t1 = $realtime;
    @(posedge bs_clk); st <= SELECT_DR_SCAN;
    @(posedge bs_clk); st <= CAPTURE_DR;
    @(posedge bs_clk); st <= SHIFT_DR; per = ($realtime - t1) / 3.0;
    repeat (3) @(posedge bs_clk);
  endtask

  realtime per;
  int e0;

  initial begin
    #(TP * 200);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TP * 1.2) trst_n = 1'b1;
    repeat (2) @(posedge bs_clk);
    check(!sys_selected, "TCK selected after reset");
    for (int i = 0; i < 5; i++) begin
      e0 = n_sys_edges;
      pass(per);
      check(per == SP, "window runs on the system clock");
      check(n_sys_edges - e0 == 4, "four system-clock steps in the window");
      check(!sys_selected, "back on TCK in Shift-DR");
      @(posedge bs_clk);
      check(tck, "bs_clk edges come from TCK again");
    end
    at_speed_en = 1'b0;
    pass(per);
    check(per == TP, "at_speed_en low keeps TCK");
    at_speed_en = 1'b1; extest = 1'b0;
    pass(per);
    check(per == TP, "no switch without EXTEST");
    check(min_phase >= SP / 2.0, "no glitch on bs_clk");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
