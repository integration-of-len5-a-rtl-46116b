// tb_instr_module: random fetches through the instruction port into an OBI
// memory, with the core's rready dropped at random. Every instruction must
// reach the core exactly once and in order, with its tag and error flag,
// including those that arrived while the core was not ready and were held
// in the buffer. A flush while an instruction is held must discard it.
// The core keeps one fetch in flight, the usage the one-entry buffer is
// built for.
module tb_instr_module;
  import bridge_pkg::*;
  import tb_mem_pkg::*;
  localparam int unsigned TAG_W = 4;
  localparam int N_REQ = 800;

  typedef struct { logic [31:0] addr; logic [TAG_W-1:0] tag; } if_t;

  logic clk = 0, rst_n = 0, flush = 0;
  logic req = 0, rready = 1;
  logic [63:0] addr = '0;
  logic [TAG_W-1:0] tag = '0;
  logic gnt, rvalid, except;
  logic [31:0] rdata;
  logic [TAG_W-1:0] rtag;
  logic [EXC_W-1:0] ecode;
  obi_req_t bq;
  obi_rsp_t bs;
  int checks = 0, failures = 0, issued = 0, done = 0, n_held = 0, n_flush = 0, n_err = 0;
  if_t exp_q[$];

  instr_module #(.TAG_W(TAG_W)) dut (
    .clk_i(clk), .rst_ni(rst_n), .flush_i(flush),
    .len5_req_i(req), .len5_gnt_o(gnt), .len5_addr_i(addr), .len5_we_i(1'b0),
    .len5_tag_i(tag), .len5_rready_i(rready), .len5_rvalid_o(rvalid),
    .len5_rdata_o(rdata), .len5_tag_o(rtag), .len5_except_raised_o(except),
    .len5_except_code_o(ecode),
    .bus_req_o(bq.req), .bus_gnt_i(bs.gnt), .bus_addr_o(bq.addr), .bus_we_o(bq.we),
    .bus_be_o(bq.be), .bus_rvalid_i(bs.rvalid), .bus_rdata_i(bs.rdata),
    .bus_except_raised_i(bs.except_raised));
  assign bq.wdata = '0;

  obi_mem_model #(.GNT_PCT(60), .MAX_LAT(4)) u_mem (.clk_i(clk), .rst_ni(rst_n), .req_i(bq), .rsp_o(bs));

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

  always @(negedge clk) begin
    if (rst_n) begin
      rready = $urandom_range(0, 3) != 0;
      // flush only when the held instruction is the only one in flight
      flush = !req && rvalid && !rready && exp_q.size() == 1 && u_mem.pend.size() == 0
              && !bs.rvalid && $urandom_range(0, 3) == 0;
      if (!req && !flush && exp_q.size() == 0 && issued < N_REQ && $urandom_range(0, 2) != 0) begin
        addr = {32'h0, ($urandom & 32'h0000_FFFC)};
        if ($urandom_range(0, 29) == 0) addr[31:28] = 4'hF;
        tag  = TAG_W'(issued);
        req  = 1'b1;
        issued++;
      end
    end
  end

  always @(posedge clk) begin
    if_t e;
    if (rst_n) begin
      if (dut.buff_sel) n_held++;
      if (flush) begin
        n_flush++;
        void'(exp_q.pop_front());
        done++;
      end else begin
        if (req && gnt) begin
          exp_q.push_back('{addr[31:0], tag});
          req <= 1'b0;
        end
        if (rvalid && rready) begin
          check(exp_q.size() != 0, "instruction with nothing outstanding");
          if (exp_q.size() != 0) begin
            e = exp_q.pop_front();
            check(rtag == e.tag, "tag order");
            check(except == is_err_addr(e.addr), "error flag");
            if (except) begin
              n_err++;
              check(ecode == E_I_ACCESS_FAULT, "access fault code");
            end else begin
              check(rdata == init_word(e.addr), "instruction word");
            end
            done++;
          end
        end
      end
      check(bq.be == 4'hF && !bq.we, "fetch is a full-word read");
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done == N_REQ);
    repeat (5) @(posedge clk);
    check(exp_q.size() == 0, "all instructions delivered");
    check(n_held > 0 && n_flush > 0 && n_err > 0, "stall buffer, flush and error exercised");
    $display("held=%0d flush=%0d err=%0d", n_held, n_flush, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
