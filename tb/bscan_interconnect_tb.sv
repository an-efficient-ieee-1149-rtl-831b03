// bscan_interconnect_tb -- board interconnect test of a chip with 232
// boundary cells (the cell count of the TMS320C6701 DSP), run with EXTEST
// at TCK rate and at system speed.
//
// The chip is bscan_delay_top with 116 input and 116 output cells. Output
// pin j is wired to input pin j through a board net modelled as a transport
// delay: 3 ns for good nets, 15 ns for one slow net (SLOW_NET); one net
// (STUCK_NET) is stuck at 0, and two nets (SHORT_A, SHORT_B) are shorted
// with AND behaviour (each receiver sees the AND of both drivers). Each net j gets the code j+1, K bits wide with
// K = ceil(log2(n+2)), so no net gets all zeros or all ones; the patterns
// are the K code bits and their complements, 2K patterns in all, applied
// as P0, ~P0, P1, ~P1, ... so that every net makes a transition at least
// K times. After each launch (late UpdateDR) the input cells capture, the
// responses are shifted out with the next pattern, and every net whose
// response differs from what it was driven with is flagged.
//
// Expected: at TCK rate the stuck net and both shorted nets are flagged;
// at system speed (10 ns clock) the slow net is flagged as well.
`timescale 1ns/1ps
module bscan_interconnect_tb;
  import bscan_pkg::*;

  localparam int NETS = 116, N = 2 * NETS;
  localparam int K = $clog2(NETS + 2);
  localparam int SLOW_NET = 37, STUCK_NET = 80, SHORT_A = 10, SHORT_B = 11;
  localparam realtime TCK_P = 100.0, SYS_P = 10.0;

  logic tck = 1'b0, sys_clk = 1'b0;
  logic at_speed_en = 1'b0, trst_n = 1'b0, tms = 1'b1, tdi = 1'b0;
  logic tdo, tdo_en, extest, samp_load, bs_clk, sys_selected, clock_dr, update_dr;
  logic [15:0] tap_state;
  logic [NETS-1:0] pin_in, pin_out, core_in, far;
  int checks = 0, failures = 0, n_patterns = 0, n_switch = 0;

  always #(TCK_P/2) tck = ~tck;
  initial begin #3; forever #(SYS_P/2) sys_clk = ~sys_clk; end
  always @(posedge sys_selected) n_switch++;

  bscan_delay_top #(.N_IN(NETS), .N_OUT(NETS)) dut (
    .tck, .sys_clk, .at_speed_en, .trst_n, .tms, .tdi, .bypass_sel(1'b0),
    .sentinel(2'b01), .tdo, .tdo_en, .extest, .samp_load, .tap_state, .bs_clk,
    .sys_selected, .clock_dr, .update_dr, .pin_in, .pin_out, .core_in,
    .core_out(core_in)
  );

  for (genvar j = 0; j < NETS; j++) begin : g_net
    localparam realtime D = (j == SLOW_NET) ? 15.0 : 3.0;
    logic p;
    assign p = pin_out[j];
    always @(posedge p or negedge p) far[j] <= #(D) p;
    if (j == STUCK_NET) begin : g_stuck
      assign pin_in[j] = 1'b0;
    end else if (j == SHORT_A || j == SHORT_B) begin : g_short
      assign pin_in[j] = far[SHORT_A] & far[SHORT_B];
    end else begin : g_good
      assign pin_in[j] = far[j];
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

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
  task automatic load_ir(input logic [1:0] code);
    logic o;
    step0(1); step0(1); step0(0); step0(0);
    for (int k = 0; k < 2; k++) step(k == 1, code[k], o);
    step0(1); step0(0);
  endtask
  task automatic shift_dr(input logic [N-1:0] din, output logic [N-1:0] dout);
    logic o;
    for (int k = 0; k < N; k++) begin
      step(k == N - 1, din[N-1-k], o);
      dout[N-1-k] = o;
    end
  endtask

  function automatic logic [NETS-1:0] pattern(int i);
    logic [NETS-1:0] p;
    for (int j = 0; j < NETS; j++) p[j] = 1'((j + 1) >> (i / 2));
    return (i % 2) ? ~p : p;
  endfunction

  // Run the whole pattern set; return the nets that failed.
  task automatic run_test(output logic [NETS-1:0] flagged);
    logic [N-1:0] din, dout;
    logic [NETS-1:0] driven;
    flagged = '0;
    step0(1); step0(0); step0(0);                 // Idle -> Shift-DR
    shift_dr({pattern(0), {NETS{1'b0}}}, dout);
    step0(1); step0(0);                           // Update-DR -> Idle
    repeat (2) step0(0);
    step0(1); step0(0); step0(0);
    for (int i = 1; i <= 2 * K; i++) begin
      din = (i < 2 * K) ? {pattern(i), {NETS{1'b0}}} : '0;
      shift_dr(din, dout);
      if (i > 1) begin
        flagged |= dout[NETS-1:0] ^ driven;
        n_patterns++;
      end
      driven = pattern(i);
      if (i < 2 * K) begin
        step0(1); step0(1); step0(0); step0(0);   // launch, capture, Shift-DR
      end else begin
        step0(1); step0(0);
      end
    end
  endtask

  logic [NETS-1:0] flagged, expect_tck, expect_speed;

  initial begin
    #(TCK_P * 100000);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_tck   = '0; expect_tck[STUCK_NET] = 1'b1;
    expect_tck[SHORT_A] = 1'b1; expect_tck[SHORT_B] = 1'b1;
    expect_speed = expect_tck; expect_speed[SLOW_NET] = 1'b1;
    #(TCK_P * 2.3) trst_n = 1'b1;
    @(negedge bs_clk);
    step0(1); step0(0);
    load_ir(INSTR_EXTEST);
    check(extest, "EXTEST loaded");

    at_speed_en = 1'b0;
    run_test(flagged);
    check(flagged == expect_tck, "TCK rate: stuck and shorted nets fail");
    check(n_patterns == 2 * K - 1, "2*ceil(log2(n+2)) patterns, all but the first launched and captured");

    at_speed_en = 1'b1;
    run_test(flagged);
    check(flagged == expect_speed, "system speed: stuck, shorted and slow nets fail");
    check(n_switch > 0, "clock switched to the system clock");
    $display("K=%0d patterns=%0d flagged at speed: %0d nets", K, 2 * K, $countones(flagged));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
