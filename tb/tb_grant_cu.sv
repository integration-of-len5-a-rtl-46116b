// tb_grant_cu: address-phase control against a model that tracks which
// halves of the current request have been granted. A double word must be
// requested on both ports until each half is granted, the core is granted
// when the last half is, and the response FIFO is pushed on the first
// grant. A narrow access uses port 1 only. The core holds its request and
// byte enable until granted, as the OBI protocol requires.
module tb_grant_cu;
  logic clk = 0, rst_n = 0;
  logic req = 0, g0 = 0, g1 = 0;
  logic [7:0] be = 8'hFF;
  logic r0, r1, lgnt, push;
  logic done0 = 0, done1 = 0;
  int checks = 0, failures = 0, n_split = 0, n_wait = 0, n_narrow = 0;
  logic [7:0] bes[4] = '{8'hFF, 8'h0F, 8'h03, 8'h01};

  grant_cu dut (.clk_i(clk), .rst_ni(rst_n), .flush_i(1'b0), .len5_req_i(req),
                .len5_be_i(be), .bus_gnt0_i(g0), .bus_gnt1_i(g1), .bus_req0_o(r0),
                .bus_req1_o(r1), .len5_gnt_o(lgnt), .push_fifo_o(push));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s t=%0t be=%h d0=%b d1=%b r0=%b r1=%b gnt=%b push=%b",
               what, $time, be, done0, done1, r0, r1, lgnt, push);
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
    logic first, last;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (!done0 && !done1) begin
        // a new request may start: pick its size
        req = $urandom_range(0, 2) != 0;
        be  = bes[$urandom_range(0, 3)];
      end
      g0 = $urandom_range(0, 1);
      g1 = $urandom_range(0, 1);
      #1;
      if (be == 8'hFF) begin
        check(r0 == (req && !done0), "port 0 requested until granted");
        check(r1 == (req && !done1), "port 1 requested until granted");
        first = req && !done0 && !done1 && (g0 || g1);
        last  = req && ((done0 || g0) && (done1 || g1));
        check(push == first, "FIFO pushed on first grant");
        check(lgnt == last, "core granted on last half");
        if (req && ((g0 && !g1 && !done1) || (g1 && !g0 && !done0)) && !done0 && !done1) n_split++;
        if (done0 || done1) n_wait++;
        if (last) begin done0 = 0; done1 = 0; end
        else if (req) begin done0 = done0 || g0; done1 = done1 || g1; end
      end else begin
        check(r0 == 1'b0, "narrow access never uses port 0");
        check(r1 == req, "narrow access on port 1");
        check(lgnt == (req && g1), "narrow grant");
        check(push == (req && g1), "narrow FIFO push");
        if (req) n_narrow++;
      end
    end
    check(n_split > 0 && n_wait > 0 && n_narrow > 0, "all grant cases exercised");
    $display("split=%0d wait=%0d narrow=%0d", n_split, n_wait, n_narrow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
