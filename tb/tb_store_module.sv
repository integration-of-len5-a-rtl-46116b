// tb_store_module: random stores of every size through the STORE port. Its
// two bus ports share one OBI memory with random timing through a
// two-master arbiter. A byte-level reference image is updated when each
// store is granted; at the end every written word of the memory must match
// it, so wrong lanes, wrong byte enables or a wrong second address show up. Acknowledgements are checked in order
// for tag and error flag.
module tb_store_module;
  import bridge_pkg::*;
  import tb_mem_pkg::*;
  localparam int unsigned TAG_W = 4;
  localparam int N_REQ = 600;

  typedef struct { logic [31:0] addr; logic [7:0] be; logic [TAG_W-1:0] tag; } st_t;

  logic clk = 0, rst_n = 0;
  logic req = 0;
  logic [63:0] addr = '0, wdata = '0;
  logic [7:0] be = 8'hFF;
  logic [TAG_W-1:0] tag = '0;
  logic gnt, rvalid, except;
  logic [TAG_W-1:0] rtag;
  obi_req_t bq0, bq1;
  obi_rsp_t bs0, bs1;
  int checks = 0, failures = 0, issued = 0, done = 0, n_split = 0, n_err = 0;
  st_t exp_q[$];
  logic [31:0] ref0 [logic [29:0]];
  logic [7:0] bes[4] = '{8'hFF, 8'h0F, 8'h03, 8'h01};

  store_module #(.TAG_W(TAG_W)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .len5_req_i(req), .len5_gnt_o(gnt), .len5_addr_i(addr), .len5_we_i(1'b1),
    .len5_be_i(be), .len5_wdata_i(wdata), .len5_tag_i(tag), .len5_rvalid_o(rvalid),
    .len5_tag_o(rtag), .len5_except_raised_o(except),
    .bus_req0_o(bq0.req), .bus_gnt0_i(bs0.gnt), .bus_addr0_o(bq0.addr), .bus_we0_o(bq0.we),
    .bus_be0_o(bq0.be), .bus_wdata0_o(bq0.wdata), .bus_rvalid0_i(bs0.rvalid),
    .bus_except_raised0_i(bs0.except_raised),
    .bus_req1_o(bq1.req), .bus_gnt1_i(bs1.gnt), .bus_addr1_o(bq1.addr), .bus_we1_o(bq1.we),
    .bus_be1_o(bq1.be), .bus_wdata1_o(bq1.wdata), .bus_rvalid1_i(bs1.rvalid),
    .bus_except_raised1_i(bs1.except_raised));


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

  // write nbytes of d at byte address a into a reference image
  task automatic ref_write(inout logic [31:0] img [logic [29:0]], input logic [31:0] a,
                           input logic [63:0] d, input int nbytes);
    for (int k = 0; k < nbytes; k++) begin
      logic [31:0] ba, w;
      ba = a + k;
      w  = img.exists(ba[31:2]) ? img[ba[31:2]] : init_word(ba);
      w[ba[1:0]*8 +: 8] = d[k*8 +: 8];
      img[ba[31:2]] = w;
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && !req && issued < N_REQ && $urandom_range(0, 2) != 0) begin
      logic [31:0] a;
      be = bes[$urandom_range(0, 3)];
      a  = $urandom & 32'h0000_03FF;
      if ($urandom_range(0, 19) == 0) a[31:28] = 4'hF;
      if (be == 8'hFF || be == 8'h0F) a[1:0] = 2'b00;
      else if (be == 8'h03) a[0] = 1'b0;
      addr  = {32'h0, a};
      wdata = {$urandom, $urandom};
      tag   = TAG_W'(issued);
      req   = 1'b1;
      issued++;
    end
  end

  always @(posedge clk) begin
    st_t e;
    logic err;
    if (rst_n) begin
      if (req && gnt) begin
        exp_q.push_back('{addr[31:0], be, tag});
        if (be == 8'hFF) begin
          n_split++;
          if (!is_err_addr(addr[31:0]))     ref_write(ref0, addr[31:0], wdata, 4);
          if (!is_err_addr(addr[31:0] + 4)) ref_write(ref0, addr[31:0] + 4, wdata >> 32, 4);
        end else if (!is_err_addr(addr[31:0])) begin
          ref_write(ref0, addr[31:0], wdata, be == 8'h0F ? 4 : (be == 8'h03 ? 2 : 1));
        end
        req <= 1'b0;
      end
      if (rvalid) begin
        check(exp_q.size() != 0, "acknowledge with nothing outstanding");
        if (exp_q.size() != 0) begin
          e = exp_q.pop_front();
          check(rtag == e.tag, "tag order");
          err = is_err_addr(e.addr) || (e.be == 8'hFF && is_err_addr(e.addr + 4));
          check(except == err, "error flag");
          if (err) n_err++;
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
    foreach (ref0[w]) check(u_mem.read_word({w, 2'b00}) == ref0[w], "memory contents");
    check(u_mem.mem.size() == ref0.size(), "no stray writes");
    check(n_split > 0 && n_err > 0, "split and error stores exercised");
    $display("split=%0d err=%0d words=%0d", n_split, n_err, ref0.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
