// tap_fsm_tb -- checks the TAP state machine against an independent table of
// the IEEE 1149.1 state diagram under random TMS, plus the asynchronous
// TRST reset and the five-clocks-of-TMS-high reset.
`timescale 1ns/1ps
module tap_fsm_tb;
  import bscan_pkg::*;

  logic clk = 1'b0, trst_n = 1'b0, tms = 1'b0;
  tap_state_e state;
  logic [15:0] tap_state;
  int checks = 0, failures = 0;

  // Reference: next state indexed by {state, tms}; states in bscan_pkg order.
  int unsigned nxt0 [16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};
  int unsigned nxt1 [16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};
  int unsigned ref_s;

  tap_fsm dut (.clk, .trst_n, .tms, .state, .tap_state);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  initial begin
    #20000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 trst_n = 1'b1;
    ref_s = 0;
    check(state == TEST_LOGIC_RESET && tap_state == 16'h0001, "reset state");
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      tms = ($urandom_range(0, 2) == 0);       // TMS high one time in three
      @(posedge clk); #1;
      ref_s = tms ? nxt1[ref_s] : nxt0[ref_s];
      check(int'(state) == ref_s, "next state");
      check(tap_state == (16'h1 << ref_s), "one-hot state");
    end
    // Five TMS-high clocks reach Test-Logic-Reset from anywhere.
    for (int s = 0; s < 16; s++) begin
      // Walk to a random state first.
      repeat ($urandom_range(1, 8)) begin
        @(negedge clk); tms = $urandom_range(0, 1);
      end
      @(negedge clk); tms = 1'b1;
      repeat (5) @(posedge clk);
      #1 check(state == TEST_LOGIC_RESET, "five TMS high reach reset");
    end
    // Asynchronous TRST in the middle of a shift.
    @(negedge clk); tms = 1'b0;
    @(negedge clk); tms = 1'b1;
    @(negedge clk); tms = 1'b0;
    @(negedge clk);
    @(negedge clk);
    check(state == SHIFT_DR, "reached Shift-DR");
    #2 trst_n = 1'b0;
    #1 check(state == TEST_LOGIC_RESET, "TRST resets asynchronously");
    trst_n = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
