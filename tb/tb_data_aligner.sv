// tb_data_aligner: random store data for each access size and offset. The
// expected bus word and byte enables are built byte by byte: the stored
// bytes must appear in the lanes selected by the address, and only those
// lanes may be enabled.
module tb_data_aligner;
  import bridge_pkg::*;
  logic [63:0] wdata;
  logic [7:0]  be;
  logic [1:0]  lsb;
  logic [31:0] w0, w1;
  logic [3:0]  b0, b1;
  int checks = 0, failures = 0;
  logic [7:0] bes[4] = '{8'hFF, 8'h0F, 8'h03, 8'h01};

  data_aligner dut (.len5_wdata_i(wdata), .len5_be_i(be), .addr_lsb_i(lsb),
                    .bus_wdata0_o(w0), .bus_wdata1_o(w1), .bus_be0_o(b0), .bus_be1_o(b1));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s be=%h lsb=%0d wdata=%h w1=%h b1=%b", what, be, lsb, wdata, w1, b1);
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
      wdata = {$urandom, $urandom};
      be    = bes[i % 4];
      lsb   = 2'($urandom);
      if (be == 8'h03) lsb[0] = 1'b0;
      if (be != 8'h01 && be != 8'h03) lsb = 2'b00;
      #1;
      check(w0 == wdata[31:0] && b0 == be[3:0], "port 0 passes low word");
      case (be)
        8'hFF: check(w1 == wdata[63:32] && b1 == 4'hF, "dword high word");
        8'h0F: check(w1 == wdata[31:0] && b1 == 4'hF, "word");
        8'h03: begin
          check(b1 == (4'b0011 << lsb), "half enables");
          check(w1[lsb*8 +: 16] == wdata[15:0], "half lane data");
        end
        default: begin
          check(b1 == (4'b0001 << lsb), "byte enable");
          check(w1[lsb*8 +: 8] == wdata[7:0], "byte lane data");
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
