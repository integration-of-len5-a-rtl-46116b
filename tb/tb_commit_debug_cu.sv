// tb_commit_debug_cu: every commit sequence, cycle by cycle. For each case
// a ROB head (class, exception, PC) is presented with a given debug mode
// and ebreakm, and the actions of each following cycle (pop, debug-mode
// write, DPC write, DCSR write with its cause, MEPC/MCAUSE write, flushes,
// PC load and its source, sampler clear, commit-register clear, issue
// resume) are compared with the expected list, which also fixes the length
// of each sequence. Written values (DPC, MEPC, MCAUSE, loaded PC) are
// checked too. The cases run in random order, many times.
module tb_commit_debug_cu;
  import debug_pkg::*;
  // action bits
  localparam int POP = 1 << 0, DM1 = 1 << 1, DM0 = 1 << 2, DPCW = 1 << 3, DCSR = 1 << 4,
                 MEPC = 1 << 8, MCAUSE = 1 << 9, FLX = 1 << 10, FLF = 1 << 11, PCL = 1 << 12,
                 SCLR = 1 << 16, CREG = 1 << 17, RES = 1 << 18;
  function automatic int cause(input int c); return DCSR | (c << 5); endfunction
  function automatic int load(input pc_sel_t s); return PCL | (int'(s) << 13); endfunction

  localparam logic [63:0] MTVEC = 64'h0000_0000_0000_0100, MEPC_V = 64'h0000_0000_0000_2000,
                          HALT = 64'h0000_0000_1A11_0800, DMEXC = 64'h0000_0000_1A11_0808,
                          DPC_V = 64'h0000_0000_0000_4444;

  logic clk = 0, rst_n = 0;
  logic head_valid = 0, dm = 0, ebm = 0;
  rob_entry_t head = '0;
  logic pop, dm_we, dm_wd, dpc_we, dcsr_we, mepc_we, mcause_we, flx, flf, pcl, sclr, creg, res;
  logic [63:0] dpc_wd, mepc_wd, pc;
  logic [2:0] dcause;
  logic [1:0] dprv;
  logic [4:0] mcause_wd;
  pc_sel_t pc_sel;
  commit_state_t state;
  int checks = 0, failures = 0, n_case[12];

  commit_debug_cu dut (
    .clk_i(clk), .rst_ni(rst_n), .head_valid_i(head_valid), .head_entry_i(head), .rob_pop_o(pop),
    .dm_i(dm), .ebreakm_i(ebm), .dpc_i(DPC_V), .mtvec_i(MTVEC), .mepc_i(MEPC_V),
    .dm_halt_addr_i(HALT), .dm_exception_addr_i(DMEXC),
    .dm_we_o(dm_we), .dm_wdata_o(dm_wd), .dpc_we_o(dpc_we), .dpc_wdata_o(dpc_wd),
    .debug_csr_write_o(dcsr_we), .dcsr_cause_o(dcause), .dcsr_prv_o(dprv),
    .mepc_we_o(mepc_we), .mepc_wdata_o(mepc_wd), .mcause_we_o(mcause_we),
    .mcause_wdata_o(mcause_wd), .flush_exec_o(flx), .flush_fe_o(flf), .pc_load_o(pcl),
    .pc_sel_o(pc_sel), .pc_o(pc), .sampler_clr_o(sclr), .comm_reg_clr_o(creg),
    .comm_resume_o(res), .state_o(state));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t state=%s", what, $time, state.name()); end
  endtask

  function automatic int actions();
    int a;
    a = 0;
    if (pop) a |= POP;
    if (dm_we) a |= dm_wd ? DM1 : DM0;
    if (dpc_we) a |= DPCW;
    if (dcsr_we) a |= cause(int'(dcause));
    if (mepc_we) a |= MEPC;
    if (mcause_we) a |= MCAUSE;
    if (flx) a |= FLX;
    if (flf) a |= FLF;
    if (pcl) a |= load(pc_sel);
    if (sclr) a |= SCLR;
    if (creg) a |= CREG;
    if (res) a |= RES;
    return a;
  endfunction

  function automatic logic [63:0] sel_pc(input pc_sel_t s);
    case (s)
      PC_SEL_MEPC:      return MEPC_V;
      PC_SEL_DM_HALT:   return HALT;
      PC_SEL_DM_EXCEPT: return DMEXC;
      PC_SEL_DPC:       return DPC_V;
      default:          return MTVEC;
    endcase
  endfunction

  // run one case: exp[0] is the decision cycle, exp[1..] the sequence
  task automatic run_case(input int id, input instr_kind_t kind, input logic exc,
                          input logic [4:0] code, input logic in_dm, input logic in_ebm,
                          input int exp[$]);
    logic [63:0] hpc;
    int a;
    hpc = {32'h0, $urandom & 32'hFFFF_FFFC};
    @(negedge clk);
    head = '0;
    head.kind = kind; head.except_raised = exc; head.except_code = code;
    head.order_crit = (kind != INSTR_OTHER) || exc;
    head.curr_pc = hpc;
    head_valid = 1; dm = in_dm; ebm = in_ebm;
    for (int k = 0; k < exp.size(); k++) begin
      if (k > 0) @(negedge clk);
      #1;
      a = actions();
      if (a != exp[k]) $display("  case %0d cycle %0d: got %h expected %h", id, k, a, exp[k]);
      check(a == exp[k], "actions of the cycle");
      if (dpc_we)    check(dpc_wd == hpc, "DPC gets the head PC");
      if (mepc_we)   check(mepc_wd == hpc, "MEPC gets the head PC");
      if (mcause_we) check(mcause_wd == code, "MCAUSE gets the exception code");
      if (dcsr_we)   check(dprv == 2'd3, "DCSR prv is M");
      if (pcl)       check(pc == sel_pc(pc_sel), "loaded PC");
      @(posedge clk);
      if (pop) head_valid = 0;
    end
    @(negedge clk);
    check(state == COMMIT_IDLE, "back to idle after the sequence");
    head_valid = 0;
    n_case[id]++;
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_case[i]) n_case[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 240; r++) begin
      case ($urandom_range(0, 11))
        0: run_case(0, INSTR_OTHER, 1, E_DEBUG, 0, $urandom_range(0, 1),   // halt request
                    '{0, POP | DM1 | FLX | SCLR, DPCW, cause(CAUSE_HALTREQ) | FLF,
                      load(PC_SEL_DM_HALT), CREG | RES});
        1: run_case(1, INSTR_EBREAK, 1, E_BREAKPOINT, 0, 1,               // ebreak enters debug
                    '{0, DM1 | FLX | SCLR, DPCW, POP | cause(CAUSE_EBREAK) | FLF,
                      load(PC_SEL_DM_HALT), CREG | RES});
        2: run_case(2, INSTR_EBREAK, 1, E_BREAKPOINT, 1, $urandom_range(0, 1), // ebreak in debug
                    '{0, POP | FLX | FLF, load(PC_SEL_DM_HALT), CREG | RES});
        3: run_case(3, INSTR_EBREAK, 1, E_BREAKPOINT, 0, 0,               // plain breakpoint
                    '{0, POP | MEPC | MCAUSE | FLX | FLF, load(PC_SEL_MTVEC), CREG | RES});
        4: run_case(4, INSTR_ECALL, 1, E_ECALL_M, 0, $urandom_range(0, 1),
                    '{0, POP | MEPC | MCAUSE | FLX | FLF, load(PC_SEL_MTVEC), CREG | RES});
        5: run_case(5, INSTR_ECALL, 1, E_ECALL_M, 1, $urandom_range(0, 1),
                    '{0, POP | FLX | FLF, load(PC_SEL_DM_EXCEPT), CREG | RES});
        6: run_case(6, INSTR_OTHER, 1, E_ILLEGAL_INSTRUCTION, 0, $urandom_range(0, 1),
                    '{0, POP | MEPC | MCAUSE | FLX | FLF, load(PC_SEL_MTVEC), CREG | RES});
        7: run_case(7, INSTR_OTHER, 1, 5'd5, 1, $urandom_range(0, 1),     // exception in debug
                    '{0, POP | FLX | FLF, load(PC_SEL_DM_EXCEPT), CREG | RES});
        8: run_case(8, INSTR_MRET, 0, 5'd0, 0, $urandom_range(0, 1),
                    '{0, POP | FLX | FLF | load(PC_SEL_MEPC)});
        9: run_case(9, INSTR_MRET, 0, 5'd0, 1, $urandom_range(0, 1),
                    '{0, POP | FLX | FLF, load(PC_SEL_DM_EXCEPT), CREG | RES});
        10: run_case(10, INSTR_DRET, 0, 5'd0, 1, $urandom_range(0, 1),    // debug exit
                     '{0, POP | DM0 | FLX | FLF, load(PC_SEL_DPC)});
        default: run_case(11, INSTR_OTHER, 0, 5'd0, $urandom_range(0, 1), $urandom_range(0, 1),
                          '{POP});
      endcase
    end
    foreach (n_case[i]) check(n_case[i] > 0, "every sequence exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
