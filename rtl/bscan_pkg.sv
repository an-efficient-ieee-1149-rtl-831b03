// bscan_pkg -- types and constants shared by the boundary scan design.
//
// The TAP controller is the 16-state machine of IEEE 1149.1. Its state is
// carried internally as a 4-bit enum and exported as a 16-bit one-hot vector
// (tap_state), one bit per state, in the order the states appear in the
// standard's state diagram (Test-Logic-Reset = bit 0 ... Update-IR = bit 15).
// The one-hot export and its order are this design's choice; they agree with
// the values shown for Shift-DR (0x0010) and Update-DR (0x0100) in the
// published simulation trace of the design.
//
// The instruction register is two bits wide, as in the published design.
// EXTEST is all zeros and BYPASS all ones, as IEEE 1149.1 requires;
// SAMPLE/PRELOAD = 2'b01 is this design's choice, and the unused code 2'b10
// behaves as BYPASS.
package bscan_pkg;

  typedef enum logic [3:0] {
    TEST_LOGIC_RESET = 4'd0,
    RUN_TEST_IDLE    = 4'd1,
    SELECT_DR_SCAN   = 4'd2,
    CAPTURE_DR       = 4'd3,
    SHIFT_DR         = 4'd4,
    EXIT1_DR         = 4'd5,
    PAUSE_DR         = 4'd6,
    EXIT2_DR         = 4'd7,
    UPDATE_DR        = 4'd8,
    SELECT_IR_SCAN   = 4'd9,
    CAPTURE_IR       = 4'd10,
    SHIFT_IR         = 4'd11,
    EXIT1_IR         = 4'd12,
    PAUSE_IR         = 4'd13,
    EXIT2_IR         = 4'd14,
    UPDATE_IR        = 4'd15
  } tap_state_e;

  localparam int unsigned IR_WIDTH = 2;

  typedef enum logic [IR_WIDTH-1:0] {
    INSTR_EXTEST  = 2'b00,
    INSTR_SAMPLE  = 2'b01,
    INSTR_UNUSED  = 2'b10,
    INSTR_BYPASS  = 2'b11
  } instr_e;

  // Next state of the TAP controller for a given TMS value.
  function automatic tap_state_e tap_next(tap_state_e s, logic tms);
    unique case (s)
      TEST_LOGIC_RESET: return tms ? TEST_LOGIC_RESET : RUN_TEST_IDLE;
      RUN_TEST_IDLE:    return tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      SELECT_DR_SCAN:   return tms ? SELECT_IR_SCAN   : CAPTURE_DR;
      CAPTURE_DR:       return tms ? EXIT1_DR         : SHIFT_DR;
      SHIFT_DR:         return tms ? EXIT1_DR         : SHIFT_DR;
      EXIT1_DR:         return tms ? UPDATE_DR        : PAUSE_DR;
      PAUSE_DR:         return tms ? EXIT2_DR         : PAUSE_DR;
      EXIT2_DR:         return tms ? UPDATE_DR        : SHIFT_DR;
      UPDATE_DR:        return tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      SELECT_IR_SCAN:   return tms ? TEST_LOGIC_RESET : CAPTURE_IR;
      CAPTURE_IR:       return tms ? EXIT1_IR         : SHIFT_IR;
      SHIFT_IR:         return tms ? EXIT1_IR         : SHIFT_IR;
      EXIT1_IR:         return tms ? UPDATE_IR        : PAUSE_IR;
      PAUSE_IR:         return tms ? EXIT2_IR         : PAUSE_IR;
      EXIT2_IR:         return tms ? UPDATE_IR        : SHIFT_IR;
      UPDATE_IR:        return tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      default:          return TEST_LOGIC_RESET;
    endcase
  endfunction

endpackage
