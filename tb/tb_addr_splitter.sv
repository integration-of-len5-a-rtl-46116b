// tb_addr_splitter: random addresses and all four access sizes. The second
// bus address is worked out arithmetically: for a double word it is the
// address of the upper word (word-aligned base + 4, or the next word when
// the access starts on an odd word); for narrower accesses both addresses
// equal the request address.
module tb_addr_splitter;
  import bridge_pkg::*;
  logic [63:0] addr;
  logic [7:0]  be;
  logic [31:0] a0, a1, exp1;
  int checks = 0, failures = 0;
  logic [7:0] bes[4] = '{8'hFF, 8'h0F, 8'h03, 8'h01};

  addr_splitter dut (.len5_addr_i(addr), .len5_be_i(be), .bus_addr0_o(a0), .bus_addr1_o(a1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      addr = {$urandom, $urandom};
      if (i % 3 == 0) addr[1:0] = 2'b00;
      be   = bes[i % 4];
      #1;
      if (be == 8'hFF) begin
        if ((addr[31:0] % 8) < 4) exp1 = (addr[31:0] & ~32'd7) + 32'd4 + (addr[31:0] % 4);
        else                      exp1 = addr[31:0] + 32'd4;
      end else exp1 = addr[31:0];
      checks++;
      if (a0 !== addr[31:0] || a1 !== exp1) begin
        failures++;
        $display("FAIL addr=%h be=%h a0=%h a1=%h exp1=%h", addr, be, a0, a1, exp1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
