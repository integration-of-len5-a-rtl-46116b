// tb_len5_xheep_top: end-to-end test of the whole design at its default
// parameters.
// Phase 1, bus traffic: len5_port_agent fetches, loads and stores through
// the bridge; the instruction port has its own OBI memory and the data
// port, after the crossbar, a second one. Meanwhile a JTAG probe on TCK
// reads the IDCODE and checks BYPASS.
// Phase 2, debug: the testbench plays the issue queue (a stream of
// instructions whose PC follows every PC load of the commit unit) and the
// debugger. It raises a halt request while the queue is empty (the Debug
// Sampler must hold it), with a fetched instruction parked in the bridge's
// buffer (the debug-entry front-end flush must drop it); checks the debug
// CSRs and their protection; leaves with DRET to the saved PC; enters again
// through EBREAK with ebreakm set; then takes an ECALL and a misprediction.
// Each mechanism is counted, and one that never happened is a failure.
module tb_len5_xheep_top;
  import bridge_pkg::*;
  import tb_mem_pkg::*;
  import debug_pkg::*;
  import jtag_pkg::*;
  localparam int unsigned TAG_W = 4;
  localparam logic [63:0] MTVEC = 64'h0000_0000_0000_0100, MEPC_V = 64'h0000_0000_0000_2000,
                          HALT = 64'h0000_0000_1A11_0800, DMEXC = 64'h0000_0000_1A11_0808;

  logic clk = 0, rst_n = 0, done;
  int checks = 0, failures = 0;

  // ------------------------------------------------------------ core ports
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
  // agent side of the instruction port, and the manual override of phase 2
  logic a_req, a_rready;
  logic [63:0] a_addr;
  logic [TAG_W-1:0] a_tag;
  logic manual = 0, m_req = 0, m_rready = 1;
  logic [63:0] m_addr = '0;

  assign instr_req    = manual ? m_req : a_req;
  assign instr_rready = manual ? m_rready : a_rready;
  assign instr_addr   = manual ? m_addr : a_addr;
  assign instr_tag    = manual ? '0 : a_tag;

  obi_req_t ireq, dreq;
  obi_rsp_t irsp, drsp;

  // --------------------------------------------------------- debug ports
  logic iq_valid = 0, iq_ready, mispredict = 0, debug_req = 0;
  instr_kind_t iq_kind = INSTR_OTHER;
  logic [63:0] iq_pc = 64'h1000;
  logic csr_valid = 0, csr_we = 0, csr_hit, csr_illegal;
  logic [11:0] csr_addr = '0;
  logic [63:0] csr_wdata = '0, csr_rdata;
  logic dm, pc_load, flush_exec, flush_fe, mepc_we, mcause_we, comm_reg_clr, commit_pop;
  logic [31:0] dcsr;
  logic [63:0] dpc, pc, mepc_wd;
  logic [4:0] mcause_wd;
  pc_sel_t pc_sel;
  commit_state_t cstate;

  // ------------------------------------------------------------------ JTAG
  logic tck = 0, trst_n = 0, tms = 1, tdi = 0, tdo;
  logic bsr_out, bsr_sh, bsr_cap, bsr_upd, bsr_en;
  logic [IR_W-1:0] jinstr;

  len5_port_agent #(.TAG_W(TAG_W), .N_FETCH(300), .N_LOAD(400), .N_STORE(400)) agent (
    .clk_i(clk), .rst_ni(rst_n), .done_o(done),
    .instr_req_o(a_req), .instr_gnt_i(instr_gnt && !manual), .instr_addr_o(a_addr),
    .instr_tag_o(a_tag), .instr_rready_o(a_rready), .instr_rvalid_i(instr_rvalid && !manual),
    .instr_rdata_i(instr_rdata), .instr_tag_i(instr_rtag), .instr_except_i(instr_exc),
    .ld_req_o(ld_req), .ld_gnt_i(ld_gnt), .ld_addr_o(ld_addr), .ld_be_o(ld_be),
    .ld_tag_o(ld_tag), .ld_rvalid_i(ld_rvalid), .ld_rdata_i(ld_rdata), .ld_tag_i(ld_rtag),
    .ld_except_i(ld_exc),
    .st_req_o(st_req), .st_gnt_i(st_gnt), .st_addr_o(st_addr), .st_be_o(st_be),
    .st_wdata_o(st_wdata), .st_tag_o(st_tag), .st_rvalid_i(st_rvalid), .st_tag_i(st_rtag),
    .st_except_i(st_exc));

  len5_xheep_top dut (
    .clk_i(clk), .rst_ni(rst_n), .flush_i(1'b0),
    .instr_req_i(instr_req), .instr_gnt_o(instr_gnt), .instr_addr_i(instr_addr),
    .instr_tag_i(instr_tag), .instr_rready_i(instr_rready), .instr_rvalid_o(instr_rvalid),
    .instr_rdata_o(instr_rdata), .instr_tag_o(instr_rtag), .instr_except_raised_o(instr_exc),
    .instr_except_code_o(instr_code),
    .ld_req_i(ld_req), .ld_gnt_o(ld_gnt), .ld_addr_i(ld_addr), .ld_be_i(ld_be),
    .ld_tag_i(ld_tag), .ld_rvalid_o(ld_rvalid), .ld_rdata_o(ld_rdata), .ld_tag_o(ld_rtag),
    .ld_except_raised_o(ld_exc),
    .st_req_i(st_req), .st_gnt_o(st_gnt), .st_addr_i(st_addr), .st_be_i(st_be),
    .st_wdata_i(st_wdata), .st_tag_i(st_tag), .st_rvalid_o(st_rvalid), .st_tag_o(st_rtag),
    .st_except_raised_o(st_exc),
    .bus_instr_req_o(ireq), .bus_instr_rsp_i(irsp), .bus_data_req_o(dreq), .bus_data_rsp_i(drsp),
    .iq_valid_i(iq_valid), .iq_ready_o(iq_ready), .iq_kind_i(iq_kind), .iq_pc_i(iq_pc),
    .mispredict_i(mispredict), .debug_req_i(debug_req), .mtvec_i(MTVEC), .mepc_i(MEPC_V),
    .dm_halt_addr_i(HALT), .dm_exception_addr_i(DMEXC),
    .csr_valid_i(csr_valid), .csr_addr_i(csr_addr), .csr_we_i(csr_we), .csr_wdata_i(csr_wdata),
    .csr_rdata_o(csr_rdata), .csr_hit_o(csr_hit), .csr_illegal_o(csr_illegal),
    .dm_o(dm), .dcsr_o(dcsr), .dpc_o(dpc), .pc_load_o(pc_load), .pc_sel_o(pc_sel), .pc_o(pc),
    .flush_exec_o(flush_exec), .flush_fe_o(flush_fe), .mepc_we_o(mepc_we),
    .mepc_wdata_o(mepc_wd), .mcause_we_o(mcause_we), .mcause_wdata_o(mcause_wd),
    .comm_reg_clr_o(comm_reg_clr), .commit_pop_o(commit_pop), .commit_state_o(cstate),
    .tck_i(tck), .trst_ni(trst_n), .tms_i(tms), .td_i(tdi), .td_o(tdo),
    .bsr_data_o(bsr_out), .bsr_data_i(1'b0), .bsr_shift_o(bsr_sh), .bsr_capture_o(bsr_cap),
    .bsr_update_o(bsr_upd), .bsr_enable_o(bsr_en), .jtag_instr_o(jinstr));

  obi_mem_model #(.GNT_PCT(70), .MAX_LAT(3)) u_imem (.clk_i(clk), .rst_ni(rst_n), .req_i(ireq), .rsp_o(irsp));
  obi_mem_model #(.GNT_PCT(60), .MAX_LAT(4)) u_dmem (.clk_i(clk), .rst_ni(rst_n), .req_i(dreq), .rsp_o(drsp));

  always #5 clk = ~clk;
  always #7 tck = ~tck;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  // ----------------------------------------------------- mechanism counters
  int n_contend = 0, n_wait_gnt = 0, n_wait_rvalid = 0, n_idcode = 0, n_bypass = 0;
  int n_sampler_hold = 0, n_debug_entry = 0, n_dret = 0, n_ebreak_entry = 0, n_fe_flush_drop = 0;
  int n_ecall = 0, n_mispredict = 0, n_csr_illegal = 0, n_csr_dm = 0, n_pops = 0;

  always @(posedge clk) if (rst_n) begin
    int nreq;
    nreq = 0;
    for (int i = 0; i < 4; i++) if (dut.u_xbar.m_req_i[i].req) nreq++;
    if (nreq > 1) n_contend++;
    if (dut.u_bridge.u_load.u_grant_cu.state_q != GNT_ISSUE ||
        dut.u_bridge.u_store.u_grant_cu.state_q != GNT_ISSUE) n_wait_gnt++;
    if (dut.u_bridge.u_load.u_rvalid_cu.state_q != RV_IDLE) n_wait_rvalid++;
    if (commit_pop) n_pops++;
  end

  // --------------------------------------------------- issue queue model
  // The head advances on every accepted issue and restarts at each PC load;
  // script_q holds instruction classes to issue next (OTHER when empty).
  instr_kind_t script_q[$];
  logic        iq_on = 0;
  logic [63:0] last_load_pc = '0;
  pc_sel_t     last_load_sel = PC_SEL_MTVEC;
  int          n_loads = 0;
  logic [63:0] head_at_halt = '0, ebreak_pc = '0;

  always @(posedge clk) if (rst_n) begin
    if (pc_load) begin
      if (pc_sel == PC_SEL_DM_HALT) head_at_halt <= iq_pc;
      iq_pc <= pc;
      last_load_pc <= pc; last_load_sel <= pc_sel; n_loads++;
      iq_kind <= script_q.size() != 0 ? script_q.pop_front() : INSTR_OTHER;
    end else if (iq_valid && iq_ready) begin
      if (iq_kind == INSTR_EBREAK) ebreak_pc <= iq_pc;
      iq_pc <= iq_pc + 4;
      iq_kind <= script_q.size() != 0 ? script_q.pop_front() : INSTR_OTHER;
    end
  end
  always @(negedge clk) iq_valid = iq_on && ($urandom_range(0, 3) != 0);

  task automatic wait_loads(input int n, input int max_cycles);
    int start;
    start = n_loads;
    for (int i = 0; i < max_cycles && n_loads < start + n; i++) @(posedge clk);
    @(negedge clk);
  endtask

  task automatic csr_access(input logic [11:0] a, input logic w, input logic [63:0] d,
                            output logic [63:0] rd, output logic ill);
    @(negedge clk);
    csr_valid = 1; csr_addr = a; csr_we = w; csr_wdata = d;
    #1 rd = csr_rdata; ill = csr_illegal;
    @(negedge clk);
    csr_valid = 0; csr_we = 0;
  endtask

  // ------------------------------------------------------------ JTAG probe
  task automatic jstep(input logic m, input logic d = 1'b0);
    @(negedge tck); tms = m; tdi = d;
    @(posedge tck);
  endtask

  task automatic jshift(input int n, input logic [63:0] din, output logic [63:0] dout);
    dout = '0;
    for (int i = 0; i < n; i++) begin
      @(negedge tck); tms = (i == n - 1); tdi = din[i];
      @(posedge tck); dout[i] = tdo;
    end
    jstep(1); jstep(0);
  endtask

  initial begin : jtag_probe
    logic [63:0] out, din;
    #30 trst_n = 1;
    jstep(1); jstep(0);
    jstep(1); jstep(0); jstep(0);             // Shift-DR
    jshift(32, 64'h0, out);
    check(out[31:0] == 32'h1000_5001, "IDCODE read over JTAG");
    if (out[31:0] == 32'h1000_5001) n_idcode++;
    jstep(1); jstep(1); jstep(0); jstep(0);   // Shift-IR
    jshift(IR_W, 64'(INSTR_BYPASS), out);
    check(out[1:0] == 2'b01, "instruction register capture");
    din = {$urandom, $urandom};
    jstep(1); jstep(0); jstep(0);
    jshift(40, din, out);
    check(out[0] == 1'b0 && out[39:1] == din[38:0], "BYPASS over JTAG");
    if (out[39:1] == din[38:0]) n_bypass++;
  end

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + agent.checks, failures + agent.failures);
    $finish;
  end

  initial begin
    logic [63:0] rd, saved_dpc;
    logic ill;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---------------- phase 1: bus traffic
    wait (done);
    repeat (10) @(posedge clk);
    foreach (agent.ref_img[w]) check(u_dmem.read_word({w, 2'b00}) == agent.ref_img[w], "stored data in memory");
    check(u_dmem.mem.size() == agent.ref_img.size(), "no stray writes");

    // ---------------- phase 2: debug
    manual = 1;
    iq_on  = 1;
    repeat (20) @(negedge clk);
    check(n_pops > 0 && !dm, "normal issue and commit");

    // debug CSRs are protected outside debug mode
    csr_access(CSR_DPC, 0, 0, rd, ill);
    check(ill, "DPC illegal outside debug mode");
    if (ill) n_csr_illegal++;

    // park a fetched instruction in the bridge buffer: rready drops after
    // the grant, before the answer
    m_rready = 1; m_addr = 64'h0000_0040; m_req = 1;
    @(posedge clk);
    while (!instr_gnt) @(posedge clk);
    @(negedge clk); m_req = 0; m_rready = 0;
    while (!instr_rvalid) @(negedge clk);
    repeat (2) @(negedge clk);
    check(instr_rvalid && instr_rdata == init_word(32'h40), "fetched word held for the core");

    // halt request while the issue queue is empty: the sampler holds it
    iq_on = 0;
    @(negedge clk); debug_req = 1;
    @(negedge clk); debug_req = 0;
    repeat (3) @(negedge clk);
    check(dut.u_issue_dbg.debug_pending_o && !dm, "halt request held while the queue is empty");
    if (dut.u_issue_dbg.debug_pending_o && !dm) n_sampler_hold++;
    iq_on = 1;
    wait_loads(1, 200);
    check(last_load_sel == PC_SEL_DM_HALT && last_load_pc == HALT, "jump to the halt address");
    check(dm, "in debug mode after halt request");
    check(dcsr[8:6] == CAUSE_HALTREQ, "dcsr cause = halt request");
    check(dpc == head_at_halt, "DPC = PC of the instruction not executed");
    check(!instr_rvalid, "front-end flush dropped the parked instruction");
    if (!instr_rvalid) n_fe_flush_drop++;
    if (dm && dpc == head_at_halt) n_debug_entry++;
    saved_dpc = dpc;
    m_rready = 1;

    // CSR work in debug mode: set ebreakm, use dscratch0
    csr_access(CSR_DCSR, 1, 64'h0000_8003, rd, ill);
    check(!ill && dcsr[15], "ebreakm set by the debugger");
    csr_access(CSR_DSCRATCH0, 1, 64'hCAFE_F00D_1234_5678, rd, ill);
    csr_access(CSR_DSCRATCH0, 0, 0, rd, ill);
    check(!ill && rd == 64'hCAFE_F00D_1234_5678, "dscratch0 in debug mode");
    csr_access(CSR_DPC, 0, 0, rd, ill);
    check(!ill && rd == saved_dpc, "DPC readable in debug mode");
    if (!ill) n_csr_dm++;
    // a halt request in debug mode is ignored
    @(negedge clk); debug_req = 1;
    @(negedge clk); debug_req = 0;
    check(!dut.u_issue_dbg.debug_pending_o, "halt request ignored in debug mode");

    // the debug program ends with DRET
    script_q.push_back(INSTR_OTHER);
    script_q.push_back(INSTR_DRET);
    wait_loads(1, 200);
    check(last_load_sel == PC_SEL_DPC && last_load_pc == saved_dpc, "DRET resumes at DPC");
    check(!dm, "debug mode left");
    if (!dm && last_load_pc == saved_dpc) n_dret++;

    // EBREAK with ebreakm enters debug mode
    script_q.push_back(INSTR_OTHER);
    script_q.push_back(INSTR_EBREAK);
    wait_loads(1, 200);
    if (iq_pc == HALT && last_load_sel == PC_SEL_DM_HALT) begin
      check(dm && dcsr[8:6] == CAUSE_EBREAK, "ebreak enters debug mode with cause 1");
      check(dpc == ebreak_pc, "DPC = address of the EBREAK");
      if (dm) n_ebreak_entry++;
    end else check(0, "ebreak did not enter debug mode");
    script_q.push_back(INSTR_DRET);
    wait_loads(1, 200);
    check(!dm && last_load_pc == ebreak_pc, "DRET back to the EBREAK");

    // ECALL outside debug mode goes to mtvec and writes MEPC/MCAUSE
    script_q.push_back(INSTR_ECALL);
    fork
      begin
        while (!mepc_we) @(posedge clk);
        check(mcause_wd == E_ECALL_M, "MCAUSE = environment call");
      end
      wait_loads(1, 200);
    join
    check(last_load_sel == PC_SEL_MTVEC && last_load_pc == MTVEC, "ECALL jumps to mtvec");
    if (last_load_pc == MTVEC) n_ecall++;

    // a misprediction blocks issue for that cycle
    @(negedge clk); mispredict = 1;
    for (int i = 0; i < 20 && n_mispredict == 0; i++) begin
      @(posedge clk);
      if (iq_valid) begin
        check(!iq_ready, "no issue during misprediction");
        if (!iq_ready) n_mispredict++;
      end
    end
    @(negedge clk); mispredict = 0;
    repeat (10) @(negedge clk);

    // ---------------- mechanisms
    check(agent.n_rready_stall > 0, "fetch held while core not ready");
    check(agent.n_dword_ld > 0 && agent.n_dword_st > 0, "double-word split");
    check(agent.n_misaligned > 0, "misaligned double word");
    check(agent.n_narrow > 0, "byte/half/word access");
    check(agent.n_err > 0, "bus error returned as exception");
    check(n_contend > 0, "crossbar contention");
    check(n_wait_gnt > 0, "wait for second grant");
    check(n_wait_rvalid > 0, "wait for second response");
    check(n_idcode > 0 && n_bypass > 0, "JTAG IDCODE and BYPASS");
    check(n_sampler_hold > 0, "halt request held by the sampler");
    check(n_debug_entry > 0, "debug entry on halt request");
    check(n_fe_flush_drop > 0, "front-end flush clears the bridge buffer");
    check(n_csr_illegal > 0 && n_csr_dm > 0, "debug CSR protection");
    check(n_dret > 0, "debug exit with DRET");
    check(n_ebreak_entry > 0, "debug entry on EBREAK");
    check(n_ecall > 0, "exception to mtvec");
    check(n_mispredict > 0, "misprediction stall");
    $display("stall=%0d split=%0d/%0d misaligned=%0d narrow=%0d err=%0d contend=%0d wait_gnt=%0d wait_rvalid=%0d",
             agent.n_rready_stall, agent.n_dword_ld, agent.n_dword_st, agent.n_misaligned,
             agent.n_narrow, agent.n_err, n_contend, n_wait_gnt, n_wait_rvalid);
    $display("idcode=%0d bypass=%0d sampler=%0d halt=%0d fe_flush=%0d dret=%0d ebreak=%0d ecall=%0d mispredict=%0d",
             n_idcode, n_bypass, n_sampler_hold, n_debug_entry, n_fe_flush_drop, n_dret,
             n_ebreak_entry, n_ecall, n_mispredict);
    $display("TB_RESULT checks=%0d failures=%0d", checks + agent.checks, failures + agent.failures);
    $finish;
  end
endmodule
