// tb_obi_xbar: four masters issue random reads to one OBI memory through
// the crossbar. Each master has its own address region, so every response
// can be checked for the right data, and must come back to the master that
// issued the request, in its order. Also checked: at most one master is
// granted per cycle, and a waiting master is granted within N_MASTERS
// grants to others (round-robin fairness).
module tb_obi_xbar;
  import bridge_pkg::*;
  import tb_mem_pkg::*;
  localparam int unsigned N = 4;
  localparam int N_REQ = 300;

  logic clk = 0, rst_n = 0;
  obi_req_t [N-1:0] mreq;
  obi_rsp_t [N-1:0] mrsp;
  obi_req_t sreq;
  obi_rsp_t srsp;
  int checks = 0, failures = 0, n_contend = 0;
  int issued[N], answered[N], waited[N];
  logic [31:0] exp_q[N][$];

  obi_xbar #(.N_MASTERS(N)) dut (.clk_i(clk), .rst_ni(rst_n), .m_req_i(mreq), .m_rsp_o(mrsp),
                                 .s_req_o(sreq), .s_rsp_i(srsp));
  obi_mem_model #(.GNT_PCT(70), .MAX_LAT(4)) u_mem (.clk_i(clk), .rst_ni(rst_n), .req_i(sreq), .rsp_o(srsp));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mreq = '0;
    for (int i = 0; i < N; i++) begin issued[i] = 0; answered[i] = 0; waited[i] = 0; end
  end

  always @(negedge clk) begin
    if (rst_n)
      for (int i = 0; i < N; i++)
        if (!mreq[i].req && issued[i] < N_REQ && $urandom_range(0, 1) != 0) begin
          mreq[i].req  = 1'b1;
          mreq[i].addr = (32'(i) << 16) | ($urandom & 32'h0000_FFFC);
          mreq[i].we   = 1'b0;
          mreq[i].be   = 4'hF;
          issued[i]++;
        end
  end

  always @(posedge clk) begin
    int ngnt, nreq;
    if (rst_n) begin
      ngnt = 0; nreq = 0;
      for (int i = 0; i < N; i++) begin
        if (mreq[i].req) nreq++;
        if (mrsp[i].gnt) begin
          ngnt++;
          check(mreq[i].req, "grant only to a requester");
          exp_q[i].push_back(init_word(mreq[i].addr));
          mreq[i].req <= 1'b0;
          waited[i] = 0;
        end else if (mreq[i].req) begin
          if (srsp.gnt && sreq.req) waited[i]++;
          check(waited[i] <= int'(N), "round-robin fairness");
        end
        if (mrsp[i].rvalid) begin
          check(exp_q[i].size() != 0, "response to the issuing master");
          if (exp_q[i].size() != 0) check(mrsp[i].rdata == exp_q[i].pop_front(), "response data and order");
          answered[i]++;
        end
      end
      check(ngnt <= 1, "one grant per cycle");
      if (nreq > 1) n_contend++;
    end
  end

  initial begin
    int total;
    repeat (3) @(negedge clk);
    rst_n = 1;
    do begin
      @(posedge clk);
      total = 0;
      for (int i = 0; i < N; i++) total += answered[i];
    end while (total < N * N_REQ);
    check(n_contend > 0, "masters contended");
    $display("contention cycles=%0d", n_contend);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
