// tb_jtag_tap: drives the TAP pins like a JTAG probe (TMS/TDI change on
// the falling edge of TCK, TDO is sampled on the rising edge) and checks:
// the IDCODE read straight after reset; the 01 pattern captured into the
// instruction register; BYPASS as a one-bit delay, both for its own opcode
// and for an unknown one; EXTEST and SAMPLE/PRELOAD routing the data path
// through an 8-cell boundary-scan chain modelled here, with the capture,
// shift and update strobes; and the return to IDCODE on TMS reset. A final
// random phase loads random instructions (known and unknown opcodes) and
// scans random data of random length through the selected register,
// sometimes resting in Pause-DR halfway, and checks every bit on TDO against
// a model of the selected register.
module tb_jtag_tap;
  import jtag_pkg::*;
  localparam logic [31:0] IDCODE = 32'h1000_5001;
  logic tck = 0, trst_n = 0, tms = 1, tdi = 0, tdo;
  logic bsr_out, bsr_sh, bsr_cap, bsr_upd, bsr_en;
  logic [IR_W-1:0] instr;
  logic [7:0] chain = 8'h00, pins = 8'hA5, upd_reg = 8'h00;
  int checks = 0, failures = 0, n_cap = 0, n_upd = 0;

  jtag_tap dut (.tck_i(tck), .trst_ni(trst_n), .tms_i(tms), .td_i(tdi), .td_o(tdo),
                .bsr_data_o(bsr_out), .bsr_data_i(chain[0]), .bsr_shift_o(bsr_sh),
                .bsr_capture_o(bsr_cap), .bsr_update_o(bsr_upd), .bsr_enable_o(bsr_en),
                .instr_o(instr));

  // boundary-scan chain: captures the pin values, shifts toward chain[0]
  always @(posedge tck) begin
    if (bsr_cap) begin chain <= pins; n_cap++; end
    else if (bsr_sh) chain <= {bsr_out, chain[7:1]};
  end
  always @(negedge tck) if (bsr_upd) begin upd_reg <= chain; n_upd++; end

  always #5 tck = ~tck;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  task automatic step(input logic m, input logic d = 1'b0);
    @(negedge tck); tms = m; tdi = d;
    @(posedge tck);
  endtask

  // shift n bits (LSB first) through the selected register from Shift-xR,
  // leaving in Exit1-xR; returns what came out on TDO
  task automatic shift(input int n, input logic [63:0] din, output logic [63:0] dout);
    dout = '0;
    for (int i = 0; i < n; i++) begin
      @(negedge tck); tms = (i == n - 1); tdi = din[i];
      @(posedge tck); dout[i] = tdo;
    end
  endtask

  task automatic scan_ir(input logic [IR_W-1:0] op, output logic [63:0] captured);
    step(1); step(1); step(0); step(0);         // RTI -> Shift-IR
    shift(IR_W, 64'(op), captured);
    step(1); step(0);                           // Update-IR -> RTI
  endtask

  task automatic scan_dr(input int n, input logic [63:0] din, output logic [63:0] dout);
    step(1); step(0); step(0);                  // RTI -> Shift-DR
    shift(n, din, dout);
    step(1); step(0);                           // Update-DR -> RTI
  endtask

  // as scan_dr, but rests in Pause-DR for a few cycles after k bits
  task automatic scan_dr_pause(input int n, input int k, input logic [63:0] din,
                               output logic [63:0] dout);
    logic [63:0] a, b;
    step(1); step(0); step(0);                  // RTI -> Shift-DR
    shift(k, din, a);                           // ends in Exit1-DR
    step(0);                                    // Pause-DR
    repeat ($urandom_range(3)) step(0);
    step(1); step(0);                           // Exit2-DR -> Shift-DR
    shift(n - k, din >> k, b);
    dout = a | (b << k);
    step(1); step(0);
  endtask

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] out, din;
    repeat (2) @(negedge tck);
    trst_n = 1;
    step(0);                                    // TLR -> RTI
    check(instr == INSTR_IDCODE, "IDCODE selected after reset");
    scan_dr(32, 64'h0, out);
    check(out[31:0] == IDCODE, "IDCODE readout");
    check(out[0] == 1'b1, "IDCODE LSB is 1");

    // BYPASS: captured IR pattern, then a one-bit delay with leading 0
    scan_ir(INSTR_BYPASS, out);
    check(out[1:0] == 2'b01, "IR capture pattern 01");
    check(instr == INSTR_BYPASS, "BYPASS selected");
    din = {$urandom, $urandom};
    scan_dr(33, din, out);
    check(out[0] == 1'b0 && out[32:1] == din[31:0], "bypass one-bit delay");
    check(!bsr_en, "boundary scan idle in BYPASS");

    // unknown opcode behaves as BYPASS
    scan_ir(5'h0A, out);
    din = {$urandom, $urandom};
    scan_dr(17, din, out);
    check(out[0] == 1'b0 && out[16:1] == din[15:0], "unknown opcode bypasses");

    // SAMPLE/PRELOAD: capture the pins, shift a new pattern in, update it
    scan_ir(INSTR_SAMPLE_PRELOAD, out);
    check(instr == INSTR_SAMPLE_PRELOAD && bsr_en, "SAMPLE/PRELOAD selects the boundary register");
    scan_dr(8, 64'h3C, out);
    check(out[7:0] == pins, "sampled pin values");
    check(upd_reg == 8'h3C, "preloaded value reaches the update stage");
    // EXTEST also routes through the chain
    scan_ir(INSTR_EXTEST, out);
    pins = 8'h5A;
    scan_dr(8, 64'hC3, out);
    check(instr == INSTR_EXTEST && out[7:0] == 8'h5A && upd_reg == 8'hC3, "EXTEST through the chain");
    check(n_cap == 2 && n_upd == 2, "capture and update strobes once per scan");

    // TMS reset returns to IDCODE
    repeat (5) step(1);
    check(instr == INSTR_IDCODE, "TMS reset selects IDCODE");
    step(0);
    scan_dr(32, 64'h0, out);
    check(out[31:0] == IDCODE, "IDCODE after TMS reset");

    // random instructions and scans
    for (int it = 0; it < 300; it++) begin
      logic [IR_W-1:0] op;
      logic [63:0] exp;
      int n, k;
      case ($urandom_range(3))
        0: op = INSTR_IDCODE;
        1: op = INSTR_BYPASS;
        2: op = ($urandom_range(1) == 1) ? INSTR_SAMPLE_PRELOAD : INSTR_EXTEST;
        default: op = IR_W'($urandom_range(3, 30));
      endcase
      scan_ir(op, out);
      check(out[1:0] == 2'b01 && instr == op, "random instruction loaded");
      pins = 8'($urandom);
      din  = {$urandom, $urandom};
      n    = $urandom_range(40, 2);
      k    = $urandom_range(n - 1, 1);
      if ($urandom_range(1) == 1) scan_dr_pause(n, k, din, out);
      else scan_dr(n, din, out);
      if (op == INSTR_IDCODE)                                 exp = {din[31:0], IDCODE};
      else if (op == INSTR_SAMPLE_PRELOAD || op == INSTR_EXTEST) exp = {din[55:0], pins};
      else                                                    exp = {din[62:0], 1'b0};
      for (int i = 0; i < n; i++) check(out[i] == exp[i], $sformatf("TDO bit %0d, op %h", i, op));
      if ((op == INSTR_SAMPLE_PRELOAD || op == INSTR_EXTEST) && n >= 8)
        check(upd_reg == exp[n +: 8], "boundary update after random scan");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
