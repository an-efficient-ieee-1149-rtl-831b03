// bsc -- type-1 boundary scan cell.
//
// Two stages, as in the standard cell: a capture/shift flip-flop and an
// update flip-flop, plus the output multiplexer.
//   capture stage: on a rising capture_clk edge with capture_en high it
//     loads si when shift_dr is high (shift) and data_in otherwise (capture);
//     so is its output.
//   update stage: on a rising update_clk edge with update_en high it copies
//     the capture stage.
//   data_out = mode ? update stage : data_in.
// Synchronous chains tie update_clk to the test clock and drive update_en
// with UpdateDR; asynchronous chains tie update_en high and clock the update
// stage with the UpdateDR pulse. The port list is that of the library cell
// the design was built from; enables are active high here (a choice). The
// cell has no reset, like the standard cell: its state is defined by the
// first shift.
module bsc (
  input  logic capture_clk,
  input  logic update_clk,
  input  logic capture_en,
  input  logic update_en,
  input  logic shift_dr,
  input  logic mode,
  input  logic si,
  input  logic data_in,
  output logic so,
  output logic data_out
);

  logic cap_q, upd_q;

  always_ff @(posedge capture_clk) begin
    if (capture_en) cap_q <= shift_dr ? si : data_in;
  end

  always_ff @(posedge update_clk) begin
    if (update_en) upd_q <= cap_q;
  end

  assign so       = cap_q;
  assign data_out = mode ? upd_q : data_in;

endmodule
