// tap_ir_tb -- checks the instruction register: capture of the sentinel
// value, shifting (LSB out first), update on the falling edge in Update-IR
// only, reset to BYPASS, the decode of all four codes and the mode outputs.
`timescale 1ns/1ps
module tap_ir_tb;
  import bscan_pkg::*;

  logic clk = 1'b0, trst_n = 1'b0, tdi = 1'b0;
  tap_state_e state = TEST_LOGIC_RESET;
  logic [1:0] sentinel = 2'b01;
  logic ir_so, extest, samp_load, bsr_sel, mode_in, mode_out;
  instr_e instr;
  int checks = 0, failures = 0;

  tap_ir dut (.clk, .trst_n, .state, .tdi, .sentinel, .ir_so, .instr,
              .extest, .samp_load, .bsr_sel, .mode_in, .mode_out);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  // The state is changed just after each rising edge, as the TAP does.
  // Capture, shift code in (LSB first), return the bits seen on ir_so.
  task automatic scan_ir(input logic [1:0] code, output logic [1:0] seen);
    @(posedge clk) #1 state = CAPTURE_IR;
    for (int k = 0; k < 2; k++) begin
      @(posedge clk) #1 state = SHIFT_IR; tdi = code[k];
      seen[k] = ir_so;
    end
    @(posedge clk) #1 state = EXIT1_IR;
  endtask

  logic [1:0] seen;
  logic e_ext, e_smp;
  instr_e prev;

  initial begin
    #20000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 trst_n = 1'b1;
    check(instr == INSTR_BYPASS && !bsr_sel, "reset to BYPASS");
    for (int i = 0; i < 40; i++) begin
      logic [1:0] code;
      code = 2'($urandom_range(0, 3));
      sentinel = 2'($urandom_range(0, 3));
      @(posedge clk) #1 state = RUN_TEST_IDLE;
      @(posedge clk) #1 state = SELECT_DR_SCAN;
      @(posedge clk) #1 state = SELECT_IR_SCAN;
      scan_ir(code, seen);
      check(seen == sentinel, "captured sentinel shifted out");
      prev = instr;
      @(posedge clk) #1 state = UPDATE_IR;
      // Before the falling edge of Update-IR the old instruction holds.
      check(instr == prev, "old instruction holds until the falling edge");
      @(negedge clk) #1;
      check(instr == instr_e'(code), "update on falling edge of Update-IR");
      e_ext = (code == 2'b00);
      e_smp = (code == 2'b01);
      check(extest == e_ext && samp_load == e_smp, "decode");
      check(bsr_sel == (e_ext || e_smp), "register select");
      check(mode_out == e_ext && mode_in == e_ext, "mode generation");
      // Shifting without Update-IR leaves the instruction alone.
      @(posedge clk) #1 state = SELECT_DR_SCAN;
      @(posedge clk) #1 state = SELECT_IR_SCAN;
      scan_ir(~code, seen);
      @(posedge clk) #1 state = PAUSE_IR;
      @(negedge clk) #1;
      check(instr == instr_e'(code), "no update outside Update-IR");
    end
    @(posedge clk) #1 state = TEST_LOGIC_RESET;
    @(negedge clk) #1;
    check(instr == INSTR_BYPASS, "Test-Logic-Reset loads BYPASS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
