// tap_controller: the IEEE 1149.1 TAP controller state machine.
//
// Sixteen states advance on each rising TCK edge according to TMS; TRSTn
// resets the machine asynchronously to Test-Logic-Reset. The decoded
// Capture/Shift/Update strobes for the IR and DR paths are combinational
// from the state and are used by the registers as enables on the same TCK.
// reset_n is a registered copy of "not in Test-Logic-Reset", refreshed on the
// falling TCK edge and cleared at once by TRSTn, so that it can serve as an
// asynchronous reset for the test data registers without glitches.
// The design description only names this block; its behaviour is the
// standard one.
module tap_controller
  import p1687_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  output tap_state_e state,
  output logic       reset_n,
  output logic       capture_dr,
  output logic       shift_dr,
  output logic       update_dr,
  output logic       capture_ir,
  output logic       shift_ir,
  output logic       update_ir
);

  tap_state_e next;

  always_comb begin
    unique case (state)
      TEST_LOGIC_RESET: next = tms ? TEST_LOGIC_RESET : RUN_TEST_IDLE;
      RUN_TEST_IDLE:    next = tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      SELECT_DR_SCAN:   next = tms ? SELECT_IR_SCAN   : CAPTURE_DR;
      CAPTURE_DR:       next = tms ? EXIT1_DR         : SHIFT_DR;
      SHIFT_DR:         next = tms ? EXIT1_DR         : SHIFT_DR;
      EXIT1_DR:         next = tms ? UPDATE_DR        : PAUSE_DR;
      PAUSE_DR:         next = tms ? EXIT2_DR         : PAUSE_DR;
      EXIT2_DR:         next = tms ? UPDATE_DR        : SHIFT_DR;
      UPDATE_DR:        next = tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      SELECT_IR_SCAN:   next = tms ? TEST_LOGIC_RESET : CAPTURE_IR;
      CAPTURE_IR:       next = tms ? EXIT1_IR         : SHIFT_IR;
      SHIFT_IR:         next = tms ? EXIT1_IR         : SHIFT_IR;
      EXIT1_IR:         next = tms ? UPDATE_IR        : PAUSE_IR;
      PAUSE_IR:         next = tms ? EXIT2_IR         : PAUSE_IR;
      EXIT2_IR:         next = tms ? UPDATE_IR        : SHIFT_IR;
      UPDATE_IR:        next = tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      default:          next = TEST_LOGIC_RESET;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) state <= TEST_LOGIC_RESET;
    else         state <= next;

  always_ff @(negedge tck or negedge trst_n)
    if (!trst_n) reset_n <= 1'b0;
    else         reset_n <= (state != TEST_LOGIC_RESET);

  assign capture_dr = (state == CAPTURE_DR);
  assign shift_dr   = (state == SHIFT_DR);
  assign update_dr  = (state == UPDATE_DR);
  assign capture_ir = (state == CAPTURE_IR);
  assign shift_ir   = (state == SHIFT_IR);
  assign update_ir  = (state == UPDATE_IR);

endmodule
