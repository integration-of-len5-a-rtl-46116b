// jtag_tap: IEEE 1149.1 Test Access Port with IDCODE, BYPASS, EXTEST and
// SAMPLE/PRELOAD.
//
// tap_controller follows TMS. The instruction register is a tap_shift_reg
// (captures ...01, shifts from TDI in Shift-IR) plus an update register
// clocked on the falling edge of TCK that loads the shifted value in
// Update-IR and returns to IDCODE in Test-Logic-Reset or on TRST_N. The
// current instruction enables one data register: IDCODE (a tap_shift_reg
// capturing the constant IDCODE_VAL), BYPASS (one flip-flop cleared in
// Capture-DR, loaded from TDI in Shift-DR) or the external boundary-scan
// register for EXTEST and SAMPLE/PRELOAD, whose capture/shift/update strobes,
// enable and serial data are brought out and whose serial output comes back
// on bsr_data_i. Unknown opcodes select BYPASS. TDO is registered on the
// falling edge of TCK from the IR (output_sw_ctrl = 1) or the selected data
// register. Structure per the document; IR width, opcodes and IDCODE value
// are this design's choices.
module jtag_tap
  import jtag_pkg::*;
#(
  parameter logic [31:0] IDCODE_VAL = 32'h1000_5001
) (
  input  logic tck_i,
  input  logic trst_ni,
  input  logic tms_i,
  input  logic td_i,
  output logic td_o,
  // boundary-scan register control
  output logic bsr_data_o,
  input  logic bsr_data_i,
  output logic bsr_shift_o,
  output logic bsr_capture_o,
  output logic bsr_update_o,
  output logic bsr_enable_o,
  output logic [IR_W-1:0] instr_o
);
  logic test_logic_reset, capture_ir, shift_ir, update_ir;
  logic capture_dr, shift_dr, update_dr, output_sw_ctrl;
  tap_state_t tap_state;

  logic [IR_W-1:0] ir_shift, ir_q;
  logic            ir_serial;
  logic            idcode_en, bypass_en, bsr_en;
  logic [31:0]     idcode_par;
  logic            idcode_serial;
  logic            bypass_q;
  logic            dr_out;

  tap_controller u_ctrl (
    .tck_i, .trst_ni, .tms_i,
    .test_logic_reset_o(test_logic_reset),
    .capture_ir_o      (capture_ir),
    .shift_ir_o        (shift_ir),
    .update_ir_o       (update_ir),
    .capture_dr_o      (capture_dr),
    .shift_dr_o        (shift_dr),
    .update_dr_o       (update_dr),
    .output_sw_ctrl_o  (output_sw_ctrl),
    .state_o           (tap_state)
  );

  // Instruction register: shift stage and falling-edge update stage
  tap_shift_reg #(.WIDTH(IR_W)) u_ir_shift (
    .tck_i, .trst_ni,
    .enable_i  (1'b1),
    .capture_i (capture_ir),
    .shift_i   (shift_ir),
    .serial_i  (td_i),
    .parallel_i(IR_W'(2'b01)),
    .serial_o  (ir_serial),
    .parallel_o(ir_shift)
  );

  always_ff @(negedge tck_i or negedge trst_ni) begin
    if (!trst_ni)              ir_q <= INSTR_IDCODE;
    else if (test_logic_reset) ir_q <= INSTR_IDCODE;
    else if (update_ir)        ir_q <= ir_shift;
  end

  always_comb begin
    idcode_en = 1'b0;
    bypass_en = 1'b0;
    bsr_en    = 1'b0;
    unique case (ir_q)
      INSTR_IDCODE:                       idcode_en = 1'b1;
      INSTR_EXTEST, INSTR_SAMPLE_PRELOAD: bsr_en    = 1'b1;
      default:                            bypass_en = 1'b1;
    endcase
  end

  // IDCODE: the fixed device code is captured into its shift stage

  tap_shift_reg #(.WIDTH(32)) u_idcode_shift (
    .tck_i, .trst_ni,
    .enable_i  (idcode_en),
    .capture_i (capture_dr),
    .shift_i   (shift_dr),
    .serial_i  (td_i),
    .parallel_i(IDCODE_VAL),
    .serial_o  (idcode_serial),
    .parallel_o(idcode_par)
  );

  // Bypass flip-flop
  always_ff @(posedge tck_i or negedge trst_ni) begin
    if (!trst_ni)                     bypass_q <= 1'b0;
    else if (bypass_en && capture_dr) bypass_q <= 1'b0;
    else if (bypass_en && shift_dr)   bypass_q <= td_i;
  end

  // Boundary-scan register control
  assign bsr_data_o    = td_i;
  assign bsr_enable_o  = bsr_en;
  assign bsr_capture_o = bsr_en & capture_dr;
  assign bsr_shift_o   = bsr_en & shift_dr;
  assign bsr_update_o  = bsr_en & update_dr;

  always_comb begin
    if (idcode_en)   dr_out = idcode_serial;
    else if (bsr_en) dr_out = bsr_data_i;
    else             dr_out = bypass_q;
  end

  always_ff @(negedge tck_i or negedge trst_ni) begin
    if (!trst_ni) td_o <= 1'b0;
    else          td_o <= output_sw_ctrl ? ir_serial : dr_out;
  end

  assign instr_o = ir_q;

  // The parallel IDCODE output and the decoded state are not needed here
  logic unused;
  assign unused = ^{idcode_par, tap_state};
endmodule
