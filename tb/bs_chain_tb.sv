// bs_chain_tb -- checks the boundary scan register (two input cells, one
// output cell): capture of pins and core outputs, serial shifting in chain
// order (input cells first), update, and the mode multiplexers of input and
// output cells, against a bit-array model.
`timescale 1ns/1ps
module bs_chain_tb;
  localparam int N_IN = 2, N_OUT = 1, N = N_IN + N_OUT;
  logic clk = 1'b0;
  logic capture_en = 0, update_en = 0, shift_dr = 0, mode_in = 0, mode_out = 0, si = 0;
  logic so;
  logic [N_IN-1:0] pin_in = '0, core_in;
  logic [N_OUT-1:0] core_out = '0, pin_out;
  logic [N-1:0] m_cap, m_upd, pat, got;
  int checks = 0, failures = 0;

  bs_chain dut (
    .capture_clk(clk), .update_clk(clk), .capture_en, .update_en, .shift_dr,
    .mode_in, .mode_out, .si, .so, .pin_in, .core_in, .core_out, .pin_out);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  initial begin
    #100000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 50; it++) begin
      pin_in = N_IN'($urandom); core_out = N_OUT'($urandom);
      pat = N'($urandom);
      // capture
      @(negedge clk) capture_en = 1; shift_dr = 0;
      @(negedge clk);
      m_cap = {core_out, pin_in};
      // shift N bits: the first bit in ends in cell N-1
      shift_dr = 1;
      for (int k = 0; k < N; k++) begin
        si = pat[N-1-k];
        got[N-1-k] = so;
        @(negedge clk);
      end
      check(got == m_cap, "captured values shifted out in chain order");
      capture_en = 0; shift_dr = 0;
      // update
      update_en = 1;
      @(negedge clk) update_en = 0;
      m_upd = pat;
      mode_in = 1'($urandom); mode_out = 1'($urandom);
      #1;
      check(core_in == (mode_in ? m_upd[N_IN-1:0] : pin_in), "input cells");
      check(pin_out == (mode_out ? m_upd[N-1:N_IN] : core_out), "output cells");
      // hold while disabled
      pin_in = ~pin_in;
      @(negedge clk);
      check(core_in == (mode_in ? m_upd[N_IN-1:0] : pin_in), "update stage holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
