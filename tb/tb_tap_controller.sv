// tb_tap_controller: the 16-state TAP controller driven with random TMS
// sequences (and occasional TRST) and compared each cycle with a model of
// the IEEE 1149.1 state diagram written as a next-state table. The decoded
// capture/shift/update strobes and the output switch control are checked
// against the model state, and five TMS=1 cycles from any state must reach
// Test-Logic-Reset.
module tb_tap_controller;
  import jtag_pkg::*;
  logic tck = 0, trst_n = 0, tms = 1;
  logic tlr, cap_ir, sh_ir, up_ir, cap_dr, sh_dr, up_dr, sw_ctrl;
  tap_state_t state;
  int checks = 0, failures = 0, visited[16];
  // model state as an index into the table below
  int ms = 0;
  // next state for TMS=0 and TMS=1, in the order of the state diagram:
  // 0 TLR, 1 RTI, 2 SelDR, 3 CapDR, 4 ShDR, 5 Ex1DR, 6 PauseDR, 7 Ex2DR,
  // 8 UpdDR, 9 SelIR, 10 CapIR, 11 ShIR, 12 Ex1IR, 13 PauseIR, 14 Ex2IR, 15 UpdIR
  int nxt0[16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};
  int nxt1[16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};
  tap_state_t names[16] = '{TEST_LOGIC_RESET, RUN_TEST_IDLE, SELECT_DR_SCAN, CAPTURE_DR,
                            SHIFT_DR, EXIT1_DR, PAUSE_DR, EXIT2_DR, UPDATE_DR, SELECT_IR_SCAN,
                            CAPTURE_IR, SHIFT_IR, EXIT1_IR, PAUSE_IR, EXIT2_IR, UPDATE_IR};

  tap_controller dut (.tck_i(tck), .trst_ni(trst_n), .tms_i(tms),
                      .test_logic_reset_o(tlr), .capture_ir_o(cap_ir), .shift_ir_o(sh_ir),
                      .update_ir_o(up_ir), .capture_dr_o(cap_dr), .shift_dr_o(sh_dr),
                      .update_dr_o(up_dr), .output_sw_ctrl_o(sw_ctrl), .state_o(state));

  always #5 tck = ~tck;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t model=%0d dut=%s", what, $time, ms, state.name()); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (visited[i]) visited[i] = 0;
    repeat (2) @(negedge tck);
    trst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge tck);
      check(state == names[ms], "state");
      check(tlr == (ms == 0), "test-logic-reset flag");
      check(cap_ir == (ms == 10) && sh_ir == (ms == 11) && up_ir == (ms == 15), "IR strobes");
      check(cap_dr == (ms == 3) && sh_dr == (ms == 4) && up_dr == (ms == 8), "DR strobes");
      check(sw_ctrl == !(ms >= 2 && ms <= 8), "output switch selects IR outside the DR column");
      visited[ms]++;
      if (i % 500 == 250) begin
        // five TMS=1 cycles reset the controller from anywhere
        tms = 1;
        repeat (5) begin @(posedge tck); ms = nxt1[ms]; @(negedge tck); end
        check(state == TEST_LOGIC_RESET, "five TMS ones reach reset");
      end else if (i % 1000 == 999) begin
        tms = 1; trst_n = 0; #1; check(state == TEST_LOGIC_RESET, "asynchronous TRST"); ms = 0;
        @(negedge tck); trst_n = 1;
      end else begin
        tms = $urandom_range(0, 2) == 0;
        @(posedge tck);
        ms = tms ? nxt1[ms] : nxt0[ms];
      end
    end
    foreach (visited[i]) check(visited[i] > 0, "every state visited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
