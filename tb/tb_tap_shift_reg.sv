// tb_tap_shift_reg: an 8-bit TAP data/instruction shift register under
// random enable, capture and shift commands, against a model register.
// Capture loads the parallel input, shift moves TDI in at the top and the
// LSB out, nothing changes while disabled or idle.
module tb_tap_shift_reg;
  localparam int unsigned W = 8;
  logic tck = 0, trst_n = 0, en = 0, cap = 0, sh = 0, sin = 0;
  logic [W-1:0] pin = '0, pout, model = '0;
  logic sout;
  int checks = 0, failures = 0, n_cap = 0, n_sh = 0;

  tap_shift_reg #(.WIDTH(W)) dut (.tck_i(tck), .trst_ni(trst_n), .enable_i(en), .capture_i(cap),
                                  .shift_i(sh), .serial_i(sin), .parallel_i(pin),
                                  .serial_o(sout), .parallel_o(pout));

  always #5 tck = ~tck;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge tck);
    trst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge tck);
      checks++;
      if (pout !== model || sout !== model[0]) begin
        failures++;
        $display("FAIL t=%0t dut=%h model=%h", $time, pout, model);
      end
      en  = $urandom_range(0, 3) != 0;
      cap = $urandom_range(0, 5) == 0;
      sh  = !cap && $urandom_range(0, 1);
      sin = $urandom_range(0, 1);
      pin = W'($urandom);
      if (en && cap) begin model = pin; n_cap++; end
      else if (en && sh) begin model = {sin, model[W-1:1]}; n_sh++; end
    end
    checks++;
    if (n_cap == 0 || n_sh == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
