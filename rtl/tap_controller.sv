// tap_controller: IEEE 1149.1 TAP controller state machine.
//
// A 16-state Moore FSM clocked on the rising edge of TCK and steered only by
// TMS; TRST_N (active low, asynchronous) forces Test-Logic-Reset, as do five
// TCK cycles with TMS high. Outputs are decoded from the state:
// test_logic_reset in Test-Logic-Reset; capture/shift/update_ir in
// Capture-IR, Shift-IR, Update-IR; capture/shift/update_dr likewise for the
// data branch. output_sw_ctrl selects what reaches TDO: 1 (instruction
// register, the default) except in the data-register branch from
// Select-DR-Scan to Update-DR, where it is 0. The state graph is the
// standard's; the signal set follows the document.
module tap_controller
  import jtag_pkg::*;
(
  input  logic tck_i,
  input  logic trst_ni,
  input  logic tms_i,
  output logic test_logic_reset_o,
  output logic capture_ir_o,
  output logic shift_ir_o,
  output logic update_ir_o,
  output logic capture_dr_o,
  output logic shift_dr_o,
  output logic update_dr_o,
  output logic output_sw_ctrl_o,
  output tap_state_t state_o
);
  tap_state_t state_q, state_d;

  always_comb begin
    unique case (state_q)
      TEST_LOGIC_RESET: state_d = tms_i ? TEST_LOGIC_RESET : RUN_TEST_IDLE;
      RUN_TEST_IDLE:    state_d = tms_i ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      SELECT_DR_SCAN:   state_d = tms_i ? SELECT_IR_SCAN   : CAPTURE_DR;
      CAPTURE_DR:       state_d = tms_i ? EXIT1_DR         : SHIFT_DR;
      SHIFT_DR:         state_d = tms_i ? EXIT1_DR         : SHIFT_DR;
      EXIT1_DR:         state_d = tms_i ? UPDATE_DR        : PAUSE_DR;
      PAUSE_DR:         state_d = tms_i ? EXIT2_DR         : PAUSE_DR;
      EXIT2_DR:         state_d = tms_i ? UPDATE_DR        : SHIFT_DR;
      UPDATE_DR:        state_d = tms_i ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      SELECT_IR_SCAN:   state_d = tms_i ? TEST_LOGIC_RESET : CAPTURE_IR;
      CAPTURE_IR:       state_d = tms_i ? EXIT1_IR         : SHIFT_IR;
      SHIFT_IR:         state_d = tms_i ? EXIT1_IR         : SHIFT_IR;
      EXIT1_IR:         state_d = tms_i ? UPDATE_IR        : PAUSE_IR;
      PAUSE_IR:         state_d = tms_i ? EXIT2_IR         : PAUSE_IR;
      EXIT2_IR:         state_d = tms_i ? UPDATE_IR        : SHIFT_IR;
      UPDATE_IR:        state_d = tms_i ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      default:          state_d = TEST_LOGIC_RESET;
    endcase
  end

  always_ff @(posedge tck_i or negedge trst_ni) begin
    if (!trst_ni) state_q <= TEST_LOGIC_RESET;
    else          state_q <= state_d;
  end

  assign test_logic_reset_o = (state_q == TEST_LOGIC_RESET);
  assign capture_ir_o       = (state_q == CAPTURE_IR);
  assign shift_ir_o         = (state_q == SHIFT_IR);
  assign update_ir_o        = (state_q == UPDATE_IR);
  assign capture_dr_o       = (state_q == CAPTURE_DR);
  assign shift_dr_o         = (state_q == SHIFT_DR);
  assign update_dr_o        = (state_q == UPDATE_DR);
  assign output_sw_ctrl_o   = !(state_q inside {SELECT_DR_SCAN, CAPTURE_DR, SHIFT_DR, EXIT1_DR,
                                                PAUSE_DR, EXIT2_DR, UPDATE_DR});
  assign state_o            = state_q;
endmodule
