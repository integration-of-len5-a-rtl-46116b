// jtag_pkg: state and instruction encodings of the IEEE 1149.1 TAP.
//
// The sixteen controller states are those of the standard. The instruction
// register width and opcodes are this design's choice: BYPASS is all ones as
// the standard requires, EXTEST all zeros, IDCODE 1 and SAMPLE/PRELOAD 2.
package jtag_pkg;

  localparam int unsigned IR_W = 5;

  localparam logic [IR_W-1:0] INSTR_EXTEST         = 5'h00;
  localparam logic [IR_W-1:0] INSTR_IDCODE         = 5'h01;
  localparam logic [IR_W-1:0] INSTR_SAMPLE_PRELOAD = 5'h02;
  localparam logic [IR_W-1:0] INSTR_BYPASS         = 5'h1F;

  typedef enum logic [3:0] {
    TEST_LOGIC_RESET,
    RUN_TEST_IDLE,
    SELECT_DR_SCAN,
    CAPTURE_DR,
    SHIFT_DR,
    EXIT1_DR,
    PAUSE_DR,
    EXIT2_DR,
    UPDATE_DR,
    SELECT_IR_SCAN,
    CAPTURE_IR,
    SHIFT_IR,
    EXIT1_IR,
    PAUSE_IR,
    EXIT2_IR,
    UPDATE_IR
  } tap_state_t;

endpackage
