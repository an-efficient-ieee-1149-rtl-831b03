// bsc_tb -- checks the boundary scan cell against a two-register model:
// capture, shift, hold when not enabled, update only when enabled, and the
// output multiplexer, under random control and data.
`timescale 1ns/1ps
module bsc_tb;
  logic clk = 1'b0;
  logic capture_en, update_en, shift_dr, mode, si, data_in;
  logic so, data_out;
  logic m_cap, m_upd;
  int checks = 0, failures = 0;

  bsc dut (.capture_clk(clk), .update_clk(clk), .capture_en, .update_en, .shift_dr,
           .mode, .si, .data_in, .so, .data_out);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  initial begin
    #50000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Define both stages: capture 0, update it.
    {capture_en, update_en, shift_dr, mode, si, data_in} = 6'b100000;
    @(posedge clk); #1;
    capture_en = 1'b0; update_en = 1'b1;
    @(posedge clk); #1;
    m_cap = 1'b0; m_upd = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      {capture_en, update_en, shift_dr, mode, si, data_in} = 6'($urandom);
      #1;
      check(data_out == (mode ? m_upd : data_in), "output multiplexer");
      check(so == m_cap, "serial output");
      @(posedge clk);
      if (update_en)  m_upd = m_cap;
      if (capture_en) m_cap = shift_dr ? si : data_in;
      #1;
      check(so == m_cap, "capture stage after edge");
      check(data_out == (mode ? m_upd : data_in), "update stage after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
