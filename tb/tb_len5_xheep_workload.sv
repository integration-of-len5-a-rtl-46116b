// tb_len5_xheep_workload: the memory traffic of small firmware kernels run
// through the whole design at its default parameters.
// A simple in-order core model issues one load or store at a time on the
// core-side ports (request, wait for the grant, wait for the response),
// the way a program's loads and stores reach the bridge. Behind the single
// data port sits an ideal on-chip memory (grant every cycle, response in the
// next cycle). The kernels mirror the benchmarks used to evaluate the
// original system: string output (a "hello world!" string written and read
// back byte by byte), sum (an array of 64-bit values written with SD and
// summed with LD), multiplication and division (operands loaded with LD,
// results stored with SD and read back as two 32-bit words with LW), plus a
// memset with SD. Every load result is checked against a byte-level
// reference image. The testbench also counts the cycles each access class
// takes and checks that a 64-bit access costs at most two cycles more than
// a 32-bit one, i.e. the two halves are serialised by the crossbar without
// extra waiting.
module tb_len5_xheep_workload;
  import bridge_pkg::*;
  import tb_mem_pkg::*;
  import debug_pkg::*;
  import jtag_pkg::*;
  localparam int unsigned TAG_W = 4;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic instr_gnt, instr_rvalid, instr_exc;
  logic [TAG_W-1:0] instr_rtag;
  logic [31:0] instr_rdata;
  logic [EXC_W-1:0] instr_code;
  logic ld_req = 0, ld_gnt, ld_rvalid, ld_exc;
  logic [63:0] ld_addr = '0, ld_rdata;
  logic [7:0] ld_be = '0;
  logic [TAG_W-1:0] ld_tag = '0, ld_rtag;
  logic st_req = 0, st_gnt, st_rvalid, st_exc;
  logic [63:0] st_addr = '0, st_wdata = '0;
  logic [7:0] st_be = '0;
  logic [TAG_W-1:0] st_tag = '0, st_rtag;
  obi_req_t ireq, dreq;
  obi_rsp_t irsp, drsp;
  logic iq_ready, csr_hit, csr_illegal, dm, pc_load, flush_exec, flush_fe, mepc_we, mcause_we;
  logic comm_reg_clr, commit_pop, tdo, bsr_out, bsr_sh, bsr_cap, bsr_upd, bsr_en;
  logic [31:0] dcsr;
  logic [63:0] csr_rdata, dpc, pc, mepc_wd;
  logic [4:0] mcause_wd;
  pc_sel_t pc_sel;
  commit_state_t cstate;
  logic [IR_W-1:0] jinstr;

  len5_xheep_top dut (
    .clk_i(clk), .rst_ni(rst_n), .flush_i(1'b0),
    .instr_req_i(1'b0), .instr_gnt_o(instr_gnt), .instr_addr_i(64'h0),
    .instr_tag_i('0), .instr_rready_i(1'b1), .instr_rvalid_o(instr_rvalid),
    .instr_rdata_o(instr_rdata), .instr_tag_o(instr_rtag), .instr_except_raised_o(instr_exc),
    .instr_except_code_o(instr_code),
    .ld_req_i(ld_req), .ld_gnt_o(ld_gnt), .ld_addr_i(ld_addr), .ld_be_i(ld_be),
    .ld_tag_i(ld_tag), .ld_rvalid_o(ld_rvalid), .ld_rdata_o(ld_rdata), .ld_tag_o(ld_rtag),
    .ld_except_raised_o(ld_exc),
    .st_req_i(st_req), .st_gnt_o(st_gnt), .st_addr_i(st_addr), .st_be_i(st_be),
    .st_wdata_i(st_wdata), .st_tag_i(st_tag), .st_rvalid_o(st_rvalid), .st_tag_o(st_rtag),
    .st_except_raised_o(st_exc),
    .bus_instr_req_o(ireq), .bus_instr_rsp_i(irsp), .bus_data_req_o(dreq), .bus_data_rsp_i(drsp),
    .iq_valid_i(1'b0), .iq_ready_o(iq_ready), .iq_kind_i(INSTR_OTHER), .iq_pc_i(64'h0),
    .mispredict_i(1'b0), .debug_req_i(1'b0), .mtvec_i(64'h100), .mepc_i(64'h0),
    .dm_halt_addr_i(64'h800), .dm_exception_addr_i(64'h808),
    .csr_valid_i(1'b0), .csr_addr_i(12'h0), .csr_we_i(1'b0), .csr_wdata_i(64'h0),
    .csr_rdata_o(csr_rdata), .csr_hit_o(csr_hit), .csr_illegal_o(csr_illegal),
    .dm_o(dm), .dcsr_o(dcsr), .dpc_o(dpc), .pc_load_o(pc_load), .pc_sel_o(pc_sel), .pc_o(pc),
    .flush_exec_o(flush_exec), .flush_fe_o(flush_fe), .mepc_we_o(mepc_we),
    .mepc_wdata_o(mepc_wd), .mcause_we_o(mcause_we), .mcause_wdata_o(mcause_wd),
    .comm_reg_clr_o(comm_reg_clr), .commit_pop_o(commit_pop), .commit_state_o(cstate),
    .tck_i(1'b0), .trst_ni(1'b0), .tms_i(1'b1), .td_i(1'b0), .td_o(tdo),
    .bsr_data_o(bsr_out), .bsr_data_i(1'b0), .bsr_shift_o(bsr_sh), .bsr_capture_o(bsr_cap),
    .bsr_update_o(bsr_upd), .bsr_enable_o(bsr_en), .jtag_instr_o(jinstr));

  obi_mem_model #(.GNT_PCT(100), .MAX_LAT(1)) u_imem (.clk_i(clk), .rst_ni(rst_n), .req_i(ireq), .rsp_o(irsp));
  obi_mem_model #(.GNT_PCT(100), .MAX_LAT(1)) u_dmem (.clk_i(clk), .rst_ni(rst_n), .req_i(dreq), .rsp_o(drsp));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  // byte-level reference image; untouched bytes follow the memory's pattern
  logic [7:0] img [logic [31:0]];
  function automatic logic [7:0] ref_byte(input logic [31:0] a);
    logic [31:0] w;
    if (img.exists(a)) return img[a];
    w = init_word({a[31:2], 2'b00});
    return w[8*a[1:0] +: 8];
  endfunction

  function automatic logic [7:0] be_of(input int unsigned size);
    case (size)
      8: return BE_DWORD;
      4: return BE_WORD;
      2: return BE_HALF;
      default: return BE_BYTE;
    endcase
  endfunction

  // cycles per access, by size index (0: 1 B, 1: 2 B, 2: 4 B, 3: 8 B)
  longint cyc_ld [4] = '{default: 0}, cyc_st [4] = '{default: 0};
  int     n_ld [4] = '{default: 0}, n_st [4] = '{default: 0};
  function automatic int sidx(input int unsigned size);
    return (size == 8) ? 3 : (size == 4) ? 2 : (size == 2) ? 1 : 0;
  endfunction

  task automatic store(input logic [31:0] a, input int unsigned size, input logic [63:0] d);
    int c = 0;
    @(negedge clk);
    st_req = 1; st_addr = {32'h0, a}; st_be = be_of(size); st_wdata = d; st_tag = st_tag + 1;
    #1;
    while (!st_gnt) begin @(negedge clk); c++; #1; end
    for (int i = 0; i < int'(size); i++) img[a + i] = d[8*i +: 8];
    @(negedge clk); c++;
    st_req = 0; st_be = '0;
    #1;
    while (!st_rvalid) begin @(negedge clk); c++; #1; end
    check(!st_exc, "store without error");
    c++;
    cyc_st[sidx(size)] += c; n_st[sidx(size)]++;
  endtask

  task automatic load(input logic [31:0] a, input int unsigned size, output logic [63:0] d);
    int c = 0;
    logic [63:0] exp = '0;
    @(negedge clk);
    ld_req = 1; ld_addr = {32'h0, a}; ld_be = be_of(size); ld_tag = ld_tag + 1;
    #1;
    while (!ld_gnt) begin @(negedge clk); c++; #1; end
    @(negedge clk); c++;
    ld_req = 0; ld_be = '0;
    #1;
    while (!ld_rvalid) begin @(negedge clk); c++; #1; end
    c++;
    // the core extends a narrow result itself, so only the loaded bytes count
    d = ld_rdata;
    for (int i = 0; i < int'(size); i++) exp[8*i +: 8] = ref_byte(a + i);
    if (size < 8) d = d & ((64'h1 << (8 * size)) - 1);
    check(d == exp && !ld_exc, $sformatf("load %0d B @%h got %h exp %h", size, a, d, exp));
    cyc_ld[sidx(size)] += c; n_ld[sidx(size)]++;
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam string HELLO = "hello world!";
  localparam logic [31:0] STR = 32'h0000_3000, ARR = 32'h0000_4000, MS = 32'h0000_5000,
                          RES = 32'h0000_6000;

  initial begin
    logic [63:0] d, sum, expsum, opa, opb;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // string output: store the characters with SB, read them back with LB
    // and once more as halfwords and words
    for (int i = 0; i < HELLO.len(); i++) store(STR + i, 1, {56'h0, HELLO[i]});
    for (int i = 0; i < HELLO.len(); i++) begin
      load(STR + i, 1, d);
      check(d[7:0] == HELLO[i], "string character");
    end
    for (int i = 0; i < HELLO.len(); i += 2) load(STR + i, 2, d);
    for (int i = 0; i < HELLO.len(); i += 4) load(STR + i, 4, d);

    // memset: 32 doublewords of zero, aligned, then read back
    for (int i = 0; i < 32; i++) store(MS + 8 * i, 8, 64'h0);
    for (int i = 0; i < 32; i++) begin load(MS + 8 * i, 8, d); check(d == 0, "memset"); end

    // sum: 64 random doublewords, 16 bytes apart (every fourth misaligned by
    // 4), summed
    expsum = 0;
    for (int i = 0; i < 64; i++) begin
      d = {$urandom, $urandom};
      store(ARR + 16 * i + ((i % 4 == 3) ? 4 : 0), 8, d);
      expsum += d;
    end
    sum = 0;
    for (int i = 0; i < 64; i++) begin
      load(ARR + 16 * i + ((i % 4 == 3) ? 4 : 0), 8, d);
      sum += d;
    end
    check(sum == expsum, "sum of the array");
    store(RES, 8, sum);

    // multiplication and division: operands from memory, results stored
    // with SD and read back as two words
    for (int i = 0; i < 16; i++) begin
      load(ARR + 16 * i, 8, opa);
      load(ARR + 16 * i + 8, 8, opb);
      store(RES + 8 + 16 * i, 8, opa * opb);
      store(RES + 16 + 16 * i, 8, (opb == 0) ? 64'h0 : opa / opb);
      load(RES + 8 + 16 * i, 4, d);
      check(d[31:0] == 32'(opa * opb), "low word of the product");
      load(RES + 12 + 16 * i, 4, d);
      load(RES + 16 + 16 * i, 8, d);
    end

    // access cost
    for (int s = 0; s < 4; s++)
      $display("size %0d B: %0d loads, %0.2f cycles each; %0d stores, %0.2f cycles each",
               1 << s, n_ld[s], (n_ld[s] > 0) ? real'(cyc_ld[s]) / n_ld[s] : 0.0,
               n_st[s], (n_st[s] > 0) ? real'(cyc_st[s]) / n_st[s] : 0.0);
    check(n_ld[3] > 0 && n_ld[2] > 0 && n_st[3] > 0 && n_st[0] > 0, "all access classes used");
    check(real'(cyc_ld[3]) / n_ld[3] <= real'(cyc_ld[2]) / n_ld[2] + 2.0,
          "64-bit load costs at most two cycles more than a 32-bit load");
    check(real'(cyc_st[3]) / n_st[3] <= real'(cyc_st[0]) / n_st[0] + 2.0,
          "64-bit store costs at most two cycles more than a byte store");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
