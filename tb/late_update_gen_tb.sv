// late_update_gen_tb -- checks that the late UpdateDR is the input pulse
// delayed by exactly 1.5 clock periods (level form) and that the pulse form
// rises on the rising clock edge 2 periods after the input pulse began.
`timescale 1ns/1ps
module late_update_gen_tb;
  localparam realtime P = 10.0;
  logic clk = 1'b0, trst_n = 1'b0, update_dr_tap = 1'b0;
  logic late_update_dr, late_update_clk;
  int checks = 0, failures = 0;
  realtime t0, t_rise, t_fall, t_prise;

  late_update_gen dut (.clk, .trst_n, .update_dr_tap, .late_update_dr, .late_update_clk);

  always #(P/2) clk = ~clk;
  always @(posedge late_update_dr)  t_rise  = $realtime;
  always @(negedge late_update_dr)  t_fall  = $realtime;
  always @(posedge late_update_clk) t_prise = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  initial begin
    #5000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 trst_n = 1'b1;
    check(!late_update_dr && !late_update_clk, "idle after reset");
    for (int i = 0; i < 10; i++) begin
      repeat ($urandom_range(3, 6)) @(posedge clk);
      t0 = $realtime;
      update_dr_tap <= 1'b1;          // one clock, as the Update-DR state
      @(posedge clk);
      update_dr_tap <= 1'b0;
      repeat (4) @(posedge clk);
      check(t_rise == t0 + 1.5 * P, "late level rises 1.5 clocks later");
      check(t_fall == t0 + 2.5 * P, "late level lasts one clock");
      check(t_prise == t0 + 2.0 * P, "late pulse rises on the edge 2 clocks later");
      check(!late_update_dr, "late level low again");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
