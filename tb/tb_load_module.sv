// tb_load_module: random loads of every size through the LOAD port. Its two
// bus ports share one OBI memory (random grant and response delays) through
// a two-master arbiter, so the halves of a double word are granted in
// either order and answered one after the other.
// Each response is checked in order against the expected word(s), lane
// selection, tag and error flag (error region on either half). Counts of
// split accesses, single-half grants and single-half responses must be
// non-zero.
module tb_load_module;
  import bridge_pkg::*;
  import tb_mem_pkg::*;
  localparam int unsigned TAG_W = 4;
  localparam int N_REQ = 600;

  typedef struct { logic [31:0] addr; logic [7:0] be; logic [TAG_W-1:0] tag; } ld_t;

  logic clk = 0, rst_n = 0;
  logic req = 0;
  logic [63:0] addr = '0;
  logic [7:0] be = 8'hFF;
  logic [TAG_W-1:0] tag = '0;
  logic gnt, rvalid, except;
  logic [63:0] rdata;
  logic [TAG_W-1:0] rtag;
  obi_req_t bq0, bq1;
  obi_rsp_t bs0, bs1;
  int checks = 0, failures = 0, issued = 0, done = 0;
  int n_split = 0, n_gnt_one = 0, n_rv_one = 0, n_err = 0;
  ld_t cur, exp_q[$];
  logic [7:0] bes[4] = '{8'hFF, 8'h0F, 8'h03, 8'h01};

  load_module #(.TAG_W(TAG_W)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .len5_req_i(req), .len5_gnt_o(gnt), .len5_addr_i(addr), .len5_we_i(1'b0),
    .len5_be_i(be), .len5_tag_i(tag), .len5_rvalid_o(rvalid), .len5_rdata_o(rdata),
    .len5_tag_o(rtag), .len5_except_raised_o(except),
    .bus_req0_o(bq0.req), .bus_gnt0_i(bs0.gnt), .bus_addr0_o(bq0.addr), .bus_we0_o(bq0.we),
    .bus_be0_o(bq0.be), .bus_rvalid0_i(bs0.rvalid), .bus_rdata0_i(bs0.rdata),
    .bus_except_raised0_i(bs0.except_raised),
    .bus_req1_o(bq1.req), .bus_gnt1_i(bs1.gnt), .bus_addr1_o(bq1.addr), .bus_we1_o(bq1.we),
    .bus_be1_o(bq1.be), .bus_rvalid1_i(bs1.rvalid), .bus_rdata1_i(bs1.rdata),
    .bus_except_raised1_i(bs1.except_raised));
  assign bq0.wdata = '0;
  assign bq1.wdata = '0;


  // The data bus has a single port: both halves share it through an
  // arbiter, so responses come back in grant order.
  obi_req_t [1:0] mreq;
  obi_rsp_t [1:0] mrsp;
  obi_req_t       sreq;
  obi_rsp_t       srsp;
  assign mreq = {bq1, bq0};
  assign bs0  = mrsp[0];
  assign bs1  = mrsp[1];
  obi_xbar #(.N_MASTERS(2)) u_xbar (.clk_i(clk), .rst_ni(rst_n), .m_req_i(mreq), .m_rsp_o(mrsp),
                                    .s_req_o(sreq), .s_rsp_i(srsp));
  obi_mem_model #(.GNT_PCT(60), .MAX_LAT(5)) u_mem (.clk_i(clk), .rst_ni(rst_n), .req_i(sreq), .rsp_o(srsp));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  function automatic logic [31:0] rand_addr(input logic [7:0] b);
    logic [31:0] a;
    a = $urandom & 32'h0000_FFFF;
    if ($urandom_range(0, 19) == 0) a[31:28] = 4'hF;
    if (b == 8'hFF || b == 8'h0F) a[1:0] = 2'b00;
    else if (b == 8'h03) a[0] = 1'b0;
    return a;
  endfunction

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // LEN5 side: requests are held until granted
  always @(negedge clk) begin
    if (rst_n && !req && issued < N_REQ && $urandom_range(0, 2) != 0) begin
      be   = bes[$urandom_range(0, 3)];
      addr = {32'h0, rand_addr(be)};
      tag  = TAG_W'(issued);
      req  = 1'b1;
      issued++;
    end
  end

  always @(posedge clk) begin
    logic [31:0] lo, hi, a;
    logic        err;
    ld_t e;
    if (rst_n) begin
      if (bq0.req && bq1.req && (bs0.gnt != bs1.gnt)) n_gnt_one++;
      if (bs0.rvalid != bs1.rvalid) n_rv_one++;
      if (req && gnt) begin
        cur = '{addr[31:0], be, tag};
        exp_q.push_back(cur);
        if (be == 8'hFF) n_split++;
        req <= 1'b0;
      end
      if (rvalid) begin
        check(exp_q.size() != 0, "response with nothing outstanding");
        if (exp_q.size() != 0) begin
          e = exp_q.pop_front();
          a = e.addr;
          check(rtag == e.tag, "tag order");
          err = is_err_addr(a) || (e.be == 8'hFF && is_err_addr(a + 4));
          check(except == err, "error flag");
          if (err) n_err++;
          else begin
            lo = init_word(a);
            hi = init_word(a + 4);
            case (e.be)
              8'hFF:   check(rdata == {hi, lo}, "double word data");
              8'h0F:   check(rdata[31:0] == lo, "word data");
              8'h03:   check(rdata[15:0] == lo[a[1:0]*8 +: 16], "half data");
              default: check(rdata[7:0] == lo[a[1:0]*8 +: 8], "byte data");
            endcase
          end
          done++;
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done == N_REQ);
    repeat (5) @(posedge clk);
    check(exp_q.size() == 0, "all responses returned");
    check(n_split > 0, "double word split");
    check(n_gnt_one > 0, "one half granted first");
    check(n_rv_one > 0, "one half answered first");
    check(n_err > 0, "error response");
    $display("split=%0d gnt_one=%0d rv_one=%0d err=%0d", n_split, n_gnt_one, n_rv_one, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
