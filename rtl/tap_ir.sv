// tap_ir -- two-bit instruction register, instruction decode and mode
// generation of the TAP.
//
// The register has the two stages IEEE 1149.1 asks for. The shift stage
// loads the sentinel value in Capture-IR and shifts TDI in at its MSB in
// Shift-IR, both on the rising clock edge; ir_so is its LSB. The update
// stage takes the shift stage on the falling edge in Update-IR, so a new
// instruction acts from the middle of Update-IR on. trst_n, and the falling
// edge in Test-Logic-Reset, load BYPASS (there is no IDCODE register).
//
// Decode: EXTEST (2'b00) and SAMPLE/PRELOAD (2'b01) select the boundary scan
// register, BYPASS (2'b11) and the unused code select the bypass register.
// Mode generation: under EXTEST the output cells drive the pins from their
// update stage and the input cells isolate the core the same way, so both
// mode outputs are set; under every other instruction the cells are
// transparent. The two-bit width and the three instructions follow the
// published design; the opcodes of SAMPLE/PRELOAD and the unused code, and
// setting the input-cell mode under EXTEST, are this design's choices.
module tap_ir
  import bscan_pkg::*;
(
  input  logic                clk,
  input  logic                trst_n,
  input  tap_state_e          state,
  input  logic                tdi,
  input  logic [IR_WIDTH-1:0] sentinel,   // value captured in Capture-IR
  output logic                ir_so,
  output instr_e              instr,
  output logic                extest,
  output logic                samp_load,
  output logic                bsr_sel,    // boundary scan register selected
  output logic                mode_in,
  output logic                mode_out
);

  logic [IR_WIDTH-1:0] shift_q;

  always_ff @(posedge clk or negedge trst_n) begin
    if (!trst_n)                 shift_q <= '0;
    else if (state == CAPTURE_IR) shift_q <= sentinel;
    else if (state == SHIFT_IR)   shift_q <= {tdi, shift_q[IR_WIDTH-1:1]};
  end

  assign ir_so = shift_q[0];

  always_ff @(negedge clk or negedge trst_n) begin
    if (!trst_n)                       instr <= INSTR_BYPASS;
    else if (state == TEST_LOGIC_RESET) instr <= INSTR_BYPASS;
    else if (state == UPDATE_IR)        instr <= instr_e'(shift_q);
  end

  always_comb begin
    extest    = (instr == INSTR_EXTEST);
    samp_load = (instr == INSTR_SAMPLE);
    bsr_sel   = extest || samp_load;
    mode_out  = extest;
    mode_in   = extest;
  end

endmodule
