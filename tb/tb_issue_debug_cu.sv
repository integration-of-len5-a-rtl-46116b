// tb_issue_debug_cu: random issue-queue traffic, halt requests, debug-mode
// changes, mispredictions and commit back-pressure, against a cycle model
// of the issue stage's debug behaviour: normal issue with the exception
// fields each instruction class must carry; a halt request (live or held
// by the Debug Sampler) becoming a dummy DEBUG entry at the PC of the
// unpopped head; an EBREAK with ebreakm entering debug mode; the stall
// until the commit stage resumes issue. The head of the issue queue is held
// while the unit is inserting a debug entry, as a real queue would.
module tb_issue_debug_cu;
  import debug_pkg::*;
  typedef enum int { M_RUN, M_DBG, M_EBK, M_STALL } mode_t;

  logic clk = 0, rst_n = 0;
  logic iq_valid = 0, iq_ready, dm = 0, ebm = 0, mispred = 0, dreq = 0, sclr = 0;
  logic comm_ready = 1, comm_valid, dbg_sel, resume = 0, pending;
  instr_kind_t kind = INSTR_OTHER;
  logic [63:0] pc = '0;
  rob_entry_t entry;
  mode_t mode = M_RUN;
  logic m_pend = 0;
  int checks = 0, failures = 0;
  int n_dbg = 0, n_ebk = 0, n_resume = 0, n_held = 0, n_normal = 0, n_dret_ill = 0;

  issue_debug_cu dut (.clk_i(clk), .rst_ni(rst_n), .iq_valid_i(iq_valid), .iq_ready_o(iq_ready),
                      .iq_kind_i(kind), .iq_pc_i(pc), .dm_i(dm), .ebreakm_i(ebm),
                      .mispredict_i(mispred), .debug_req_i(dreq), .sampler_clr_i(sclr),
                      .debug_pending_o(pending), .comm_valid_o(comm_valid),
                      .comm_ready_i(comm_ready), .comm_entry_o(entry),
                      .issue_debug_sel_o(dbg_sel), .comm_resume_i(resume));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t mode=%s", what, $time, mode.name()); end
  endtask

  task automatic check_normal_entry();
    check(entry.kind == kind && entry.curr_pc == pc, "entry carries class and PC");
    case (kind)
      INSTR_EBREAK: check(entry.except_raised && entry.except_code == E_BREAKPOINT, "breakpoint exception");
      INSTR_ECALL:  check(entry.except_raised && entry.except_code == E_ECALL_M, "ecall exception");
      INSTR_DRET: begin
        check(entry.except_raised == !dm, "dret illegal outside debug mode");
        if (!dm) begin
          check(entry.except_code == E_ILLEGAL_INSTRUCTION, "illegal instruction code");
          n_dret_ill++;
        end
      end
      INSTR_MRET:   check(!entry.except_raised && entry.order_crit, "mret is order-critical");
      default:      check(!entry.except_raised, "plain instruction");
    endcase
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic want_dbg, taken;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      // stimulus: the head and debug mode stay put while a debug entry is built
      if (mode == M_RUN || mode == M_STALL) begin
        if (!iq_valid || iq_ready || $urandom_range(0, 3) == 0) begin
          iq_valid = $urandom_range(0, 3) != 0;
          kind     = instr_kind_t'($urandom_range(0, 4));
          pc       = {32'h0, $urandom & 32'hFFFF_FFFC};
        end
        if ($urandom_range(0, 49) == 0) dm = !dm;
        ebm = $urandom_range(0, 1);
      end
      mispred    = $urandom_range(0, 9) == 0;
      dreq       = $urandom_range(0, 24) == 0;
      sclr       = $urandom_range(0, 99) == 0;
      comm_ready = $urandom_range(0, 4) != 0;
      resume     = (mode == M_STALL) && $urandom_range(0, 3) == 0;
      #1;
      check(pending == m_pend, "debug sampler");
      want_dbg = (dreq || m_pend) && !dm;
      taken    = 1'b0;
      case (mode)
        M_RUN: begin
          if (mispred || !iq_valid) begin
            check(!comm_valid && !iq_ready, "no issue on mispredict or empty queue");
          end else if (kind == INSTR_EBREAK && ebm && !dm) begin
            check(!comm_valid && !iq_ready, "ebreak to debug mode: switch state first");
            mode = M_EBK;
          end else if (want_dbg) begin
            check(!comm_valid && !iq_ready, "halt request: switch state first");
            mode = M_DBG;
          end else begin
            check(comm_valid && !dbg_sel && iq_ready == comm_ready, "normal issue");
            check_normal_entry();
            n_normal++;
          end
        end
        M_DBG: begin
          check(comm_valid && dbg_sel && !iq_ready, "dummy debug entry, head kept");
          check(entry.except_raised && entry.except_code == E_DEBUG && entry.order_crit,
                "debug entry fields");
          check(entry.curr_pc == pc, "debug entry carries head PC");
          if (comm_ready) begin mode = M_STALL; n_dbg++; taken = 1'b1; end
        end
        M_EBK: begin
          check(comm_valid && !dbg_sel && iq_ready == comm_ready, "ebreak issued and popped");
          check(entry.except_raised && entry.except_code == E_BREAKPOINT, "ebreak entry fields");
          if (comm_ready) begin mode = M_STALL; n_ebk++; taken = 1'b1; end
        end
        default: begin
          check(!comm_valid && !iq_ready, "stalled until resume");
          if (resume) begin mode = M_RUN; n_resume++; end
        end
      endcase
      // sampler model
      if (taken || sclr)
        m_pend = 1'b0;
      else if (dreq && !dm) m_pend = 1'b1;
      if (m_pend && mode == M_RUN) n_held++;
    end
    check(n_normal > 0 && n_dbg > 0 && n_ebk > 0 && n_resume > 0 && n_held > 0 && n_dret_ill > 0,
          "all issue cases exercised");
    $display("normal=%0d debug=%0d ebreak=%0d resume=%0d held=%0d", n_normal, n_dbg, n_ebk, n_resume, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
