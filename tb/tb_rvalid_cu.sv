// tb_rvalid_cu: response-phase control against a model of one outstanding
// response. For a double word the two halves arrive on random cycles, at
// once or one after the other, each possibly with an error. Expected: the
// core sees rvalid only when both halves are in, an error if either half
// had one, a lone first half is written to the buffer from its own port,
// and the output assembly selects match which half was buffered.
module tb_rvalid_cu;
  logic clk = 0, rst_n = 0;
  logic [7:0] be = 8'hFF;
  logic v0 = 0, v1 = 0, e0 = 0, e1 = 0;
  logic rv, reg_en, reg_mux, exit0, exit1, exc;
  logic got0 = 0, got1 = 0, err = 0;
  int checks = 0, failures = 0, n_both = 0, n_first0 = 0, n_first1 = 0, n_err = 0;
  logic [7:0] bes[4] = '{8'hFF, 8'h0F, 8'h03, 8'h01};

  rvalid_cu dut (.clk_i(clk), .rst_ni(rst_n), .flush_i(1'b0), .fifo_be_i(be),
                 .bus_rvalid0_i(v0), .bus_rvalid1_i(v1), .bus_except0_i(e0),
                 .bus_except1_i(e1), .len5_rvalid_o(rv), .reg_en_o(reg_en),
                 .reg_ctr_mux_o(reg_mux), .exit0_ctr_mux_o(exit0),
                 .exit1_ctr_mux_o(exit1), .len5_except_o(exc));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t be=%h got=%b%b v=%b%b rv=%b en=%b mux=%b x0=%b x1=%b exc=%b",
               what, $time, be, got1, got0, v1, v0, rv, reg_en, reg_mux, exit0, exit1, exc);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic done;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (!got0 && !got1) be = bes[$urandom_range(0, 3)];
      v0 = (be == 8'hFF) && !got0 && $urandom_range(0, 1);
      v1 = (be == 8'hFF ? !got1 : 1'b1) && $urandom_range(0, 1);
      e0 = v0 && ($urandom_range(0, 7) == 0);
      e1 = v1 && ($urandom_range(0, 7) == 0);
      #1;
      if (be == 8'hFF) begin
        done = (got0 || v0) && (got1 || v1);
        check(rv == done, "rvalid when both halves in");
        if (done) begin
          check(exc == (err || (v0 && e0) || (v1 && e1)), "error of either half");
          if (v0 && v1)  check(exit1 == 1'b1, "both halves direct");
          else if (got0) check(exit0 == 1'b1 && exit1 == 1'b0, "low half from buffer");
          else           check(exit0 == 1'b0 && exit1 == 1'b0, "high half from buffer");
          if (err || e0 || e1) n_err++;
          if (v0 && v1) n_both++;
          got0 = 0; got1 = 0; err = 0;
        end else begin
          check(reg_en == (v0 ^ v1), "lone half buffered");
          if (v0 ^ v1) check(reg_mux == v1, "buffer takes the arriving port");
          if (v0 && !got1) n_first0++;
          if (v1 && !got0) n_first1++;
          got0 = got0 || v0; got1 = got1 || v1;
          err  = err || (v0 && e0) || (v1 && e1);
        end
      end else begin
        check(rv == v1, "narrow rvalid on port 1");
        check(exc == (v1 && e1), "narrow error on port 1");
      end
    end
    check(n_both > 0 && n_first0 > 0 && n_first1 > 0 && n_err > 0, "all response cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
