// tb_bridge: the whole bridge with all three core ports active at once.
// len5_port_agent plays the core; the instruction port talks to its own OBI
// memory, and the four data ports (load low/high, store low/high) share a
// second memory through a four-master arbiter, as on the single-port data
// bus. At the end the store region of the data memory must equal the
// agent's reference image, and every mechanism (rready stall, double-word
// split, misaligned double word, narrow access, error) must have occurred.
module tb_bridge;
  import bridge_pkg::*;
  import tb_mem_pkg::*;
  localparam int unsigned TAG_W = 4;

  logic clk = 0, rst_n = 0, done;
  int checks = 0, failures = 0;

  logic instr_req, instr_gnt, instr_rready, instr_rvalid, instr_exc;
  logic [63:0] instr_addr;
  logic [TAG_W-1:0] instr_tag, instr_rtag;
  logic [31:0] instr_rdata;
  logic [EXC_W-1:0] instr_code;
  logic ld_req, ld_gnt, ld_rvalid, ld_exc;
  logic [63:0] ld_addr, ld_rdata;
  logic [7:0] ld_be;
  logic [TAG_W-1:0] ld_tag, ld_rtag;
  logic st_req, st_gnt, st_rvalid, st_exc;
  logic [63:0] st_addr, st_wdata;
  logic [7:0] st_be;
  logic [TAG_W-1:0] st_tag, st_rtag;

  obi_req_t ireq, sreq;
  obi_rsp_t irsp, srsp;
  obi_req_t [1:0] ldq, stq;
  obi_rsp_t [1:0] lds, sts;
  obi_rsp_t [3:0] xrsp;

  len5_port_agent #(.TAG_W(TAG_W), .N_FETCH(300), .N_LOAD(400), .N_STORE(400)) agent (
    .clk_i(clk), .rst_ni(rst_n), .done_o(done),
    .instr_req_o(instr_req), .instr_gnt_i(instr_gnt), .instr_addr_o(instr_addr),
    .instr_tag_o(instr_tag), .instr_rready_o(instr_rready), .instr_rvalid_i(instr_rvalid),
    .instr_rdata_i(instr_rdata), .instr_tag_i(instr_rtag), .instr_except_i(instr_exc),
    .ld_req_o(ld_req), .ld_gnt_i(ld_gnt), .ld_addr_o(ld_addr), .ld_be_o(ld_be),
    .ld_tag_o(ld_tag), .ld_rvalid_i(ld_rvalid), .ld_rdata_i(ld_rdata), .ld_tag_i(ld_rtag),
    .ld_except_i(ld_exc),
    .st_req_o(st_req), .st_gnt_i(st_gnt), .st_addr_o(st_addr), .st_be_o(st_be),
    .st_wdata_o(st_wdata), .st_tag_o(st_tag), .st_rvalid_i(st_rvalid), .st_tag_i(st_rtag),
    .st_except_i(st_exc));

  bridge #(.TAG_W(TAG_W)) dut (
    .clk_i(clk), .rst_ni(rst_n), .flush_i(1'b0),
    .instr_req_i(instr_req), .instr_gnt_o(instr_gnt), .instr_addr_i(instr_addr),
    .instr_we_i(1'b0), .instr_tag_i(instr_tag), .instr_rready_i(instr_rready),
    .instr_rvalid_o(instr_rvalid), .instr_rdata_o(instr_rdata), .instr_tag_o(instr_rtag),
    .instr_except_raised_o(instr_exc), .instr_except_code_o(instr_code),
    .ld_req_i(ld_req), .ld_gnt_o(ld_gnt), .ld_addr_i(ld_addr), .ld_we_i(1'b0),
    .ld_be_i(ld_be), .ld_tag_i(ld_tag), .ld_rvalid_o(ld_rvalid), .ld_rdata_o(ld_rdata),
    .ld_tag_o(ld_rtag), .ld_except_raised_o(ld_exc),
    .st_req_i(st_req), .st_gnt_o(st_gnt), .st_addr_i(st_addr), .st_we_i(1'b1),
    .st_be_i(st_be), .st_wdata_i(st_wdata), .st_tag_i(st_tag), .st_rvalid_o(st_rvalid),
    .st_tag_o(st_rtag), .st_except_raised_o(st_exc),
    .bus_instr_req_o(ireq), .bus_instr_rsp_i(irsp),
    .bus_ld_req_o(ldq), .bus_ld_rsp_i(lds), .bus_st_req_o(stq), .bus_st_rsp_i(sts));

  obi_mem_model #(.GNT_PCT(70), .MAX_LAT(3)) u_imem (.clk_i(clk), .rst_ni(rst_n), .req_i(ireq), .rsp_o(irsp));
  obi_xbar #(.N_MASTERS(4)) u_xbar (.clk_i(clk), .rst_ni(rst_n), .m_req_i({stq, ldq}), .m_rsp_o(xrsp),
                                    .s_req_o(sreq), .s_rsp_i(srsp));
  assign lds = xrsp[1:0];
  assign sts = xrsp[3:2];
  obi_mem_model #(.GNT_PCT(60), .MAX_LAT(4)) u_dmem (.clk_i(clk), .rst_ni(rst_n), .req_i(sreq), .rsp_o(srsp));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #800000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + agent.checks, failures + agent.failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done);
    repeat (5) @(posedge clk);
    foreach (agent.ref_img[w]) check(u_dmem.read_word({w, 2'b00}) == agent.ref_img[w], "stored data in memory");
    check(u_dmem.mem.size() == agent.ref_img.size(), "no stray writes");
    check(instr_code == E_I_ACCESS_FAULT, "instruction exception code");
    check(agent.n_rready_stall > 0, "instruction held while core not ready");
    check(agent.n_dword_ld > 0 && agent.n_dword_st > 0, "double-word split");
    check(agent.n_misaligned > 0, "misaligned double word");
    check(agent.n_narrow > 0, "narrow access");
    check(agent.n_err > 0, "error response");
    $display("stall=%0d dword_ld=%0d dword_st=%0d misaligned=%0d narrow=%0d err=%0d",
             agent.n_rready_stall, agent.n_dword_ld, agent.n_dword_st, agent.n_misaligned,
             agent.n_narrow, agent.n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks + agent.checks, failures + agent.failures);
    $finish;
  end
endmodule
