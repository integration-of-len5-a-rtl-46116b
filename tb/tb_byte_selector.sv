// tb_byte_selector: random bus words and buffer contents. For double words
// the three assemblies (both halves from the bus in the same cycle, low
// half buffered, high half buffered) are checked; for narrow loads the
// byte, half word or word selected by the address must land in the low
// bits of the result.
module tb_byte_selector;
  import bridge_pkg::*;
  logic [31:0] d0, d1, buff;
  logic        ex0, ex1;
  logic [7:0]  be;
  logic [1:0]  lsb;
  logic [63:0] rd;
  int checks = 0, failures = 0;
  logic [7:0] bes[4] = '{8'hFF, 8'h0F, 8'h03, 8'h01};

  byte_selector dut (.bus_rdata0_i(d0), .bus_rdata1_i(d1), .buffer_i(buff),
                     .exit0_ctr_mux_i(ex0), .exit1_ctr_mux_i(ex1), .be_i(be),
                     .addr_lsb_i(lsb), .len5_rdata_o(rd));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s be=%h lsb=%0d ex0=%b ex1=%b rd=%h", what, be, lsb, ex0, ex1, rd);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      d0 = $urandom; d1 = $urandom; buff = $urandom;
      be = bes[i % 4];
      lsb = 2'($urandom);
      if (be == 8'h03) lsb[0] = 1'b0;
      if (be == 8'hFF || be == 8'h0F) lsb = 2'b00;
      // at most one of the two selects is active at a time
      case ($urandom_range(0, 2))
        0: begin ex0 = 0; ex1 = 0; end
        1: begin ex0 = 1; ex1 = 0; end
        default: begin ex0 = 0; ex1 = 1; end
      endcase
      #1;
      case (be)
        8'hFF: begin
          if (ex1)      check(rd == {d1, d0}, "dword same cycle");
          else if (ex0) check(rd == {d1, buff}, "dword low buffered");
          else          check(rd == {buff, d0}, "dword high buffered");
        end
        8'h0F: check(rd == {32'b0, d1}, "word");
        8'h03: check(rd[15:0] == d1[lsb*8 +: 16] && rd[63:32] == 0, "half");
        default: check(rd[7:0] == d1[lsb*8 +: 8] && rd[63:32] == 0, "byte");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
