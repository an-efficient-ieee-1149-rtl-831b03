// late_update_gen -- the "1.5 TCK late UpdateDR" block of the modified TAP.
//
// update_dr_tap is the TAP's own UpdateDR level, high for the whole
// Update-DR state (one clock, from rising edge t0 to t0+1). Two
// falling-edge flip-flops pass it on: the first samples it half a clock
// after it rises, the second one clock after that, so late_update_dr is the
// same one-clock pulse 1.5 clocks later: high from the falling edge at
// t0+1.5 to t0+2.5. With the usual path
// Update-DR -> Select-DR-Scan -> Capture-DR its rising clock edge inside the
// pulse is t0+2, the edge that enters Capture-DR, one clock before the
// capture edge at t0+3.
//
// late_update_clk is the pulse form for boundary cells whose update stage is
// clocked by UpdateDR ("asynchronous" cells): the late level gated with the
// high phase of clk, so its rising edge is the rising edge t0+2. The
// standard form of that pulse, for comparison, rises at the falling edge
// t0+0.5, 2.5 clocks before the capture.
//
// The published area figures count three flip-flops for this block; two
// are enough for the 1.5-clock delay (a third, rising-edge stage in between
// would not change the output), so this design uses two.
module late_update_gen (
  input  logic clk,
  input  logic trst_n,
  input  logic update_dr_tap,
  output logic late_update_dr,
  output logic late_update_clk
);

  logic half_q;

  always_ff @(negedge clk or negedge trst_n) begin
    if (!trst_n) begin
      half_q         <= 1'b0;
      late_update_dr <= 1'b0;
    end else begin
      half_q         <= update_dr_tap;
      late_update_dr <= half_q;
    end
  end

  assign late_update_clk = late_update_dr & clk;

endmodule
