// tb_instr_cu: the instruction control unit against a one-entry model.
// The model only remembers whether a fetched word is being held because
// the core was not ready. Random req, rready, gnt and rvalid are applied
// (a bus response never arrives while a word is held, since no request is
// forwarded while rready is low); every output is compared each cycle.
module tb_instr_cu;
  logic clk = 0, rst_n = 0, flush = 0;
  logic req = 0, rready = 0, gnt = 0, rvalid = 0;
  logic bus_req, len5_gnt, len5_rvalid, buff_en, buff_sel;
  logic held = 0;
  int checks = 0, failures = 0, n_held = 0, n_release = 0;

  instr_cu dut (.clk_i(clk), .rst_ni(rst_n), .flush_i(flush), .len5_req_i(req),
                .len5_rready_i(rready), .bus_gnt_i(gnt), .bus_rvalid_i(rvalid),
                .bus_req_o(bus_req), .len5_gnt_o(len5_gnt), .len5_rvalid_o(len5_rvalid),
                .buff_en_o(buff_en), .buff_sel_o(buff_sel));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t held=%b", what, $time, held); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      req    = $urandom_range(0, 1);
      rready = $urandom_range(0, 3) != 0;
      gnt    = $urandom_range(0, 1);
      rvalid = !held && $urandom_range(0, 1);
      flush  = $urandom_range(0, 199) == 0;
      #1;
      check(bus_req == (req && rready), "request forwarded only when ready");
      check(len5_gnt == (gnt && rready), "grant forwarded only when ready");
      check(len5_rvalid == (held || rvalid), "rvalid to core");
      check(buff_sel == held, "output from buffer when held");
      if (!held) check(buff_en == !rready, "buffer loads when core stalls");
      else       check(buff_en == 1'b0, "held word not overwritten");
      if (held && rready) n_release++;
      if (flush) held = 0;
      else if (!held && rvalid && !rready) begin held = 1; n_held++; end
      else if (held && rready) held = 0;
    end
    check(n_held > 0 && n_release > 0, "stall buffering exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
