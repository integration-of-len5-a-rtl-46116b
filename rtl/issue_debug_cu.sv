// issue_debug_cu: debug-mode part of the core's issue control unit.
//
// A halt request (debug_req_i) is turned into an exception at issue. The
// Debug Sampler flag remembers a request that arrives while not in debug
// mode (its enable is debug_req & ~dm) until the issue unit takes it, or
// until the commit unit clears it (sampler_clr_i). Priorities in S_ISSUE:
// a misprediction flush blocks issue; then an EBREAK that must enter debug
// mode (ebreakm = 1, not in debug mode) goes to S_ISSUE_EBREAK_DM; then a
// pending or incoming halt request goes to S_ISSUE_DEBUG; otherwise the
// instruction at the head of the issue queue is issued normally
// (comm_valid = iq_valid, iq_ready = comm_ready).
// S_ISSUE_DEBUG sends the dummy DEBUG_REQ entry (order_crit = 1,
// except_raised = 1, except_code = E_DEBUG, curr_pc = PC of the head
// instruction, which is not popped and will be fetched again after DRET)
// with issue_debug_sel = 1 and clears the sampler. S_ISSUE_EBREAK_DM sends
// the EBREAK itself (order_crit, skip_eu, except_raised, E_BREAKPOINT), pops
// it and clears the sampler. Both then wait in S_STALL for comm_resume_i.
// A DRET is issued with skip_eu = 1, order_crit = 1 and an illegal-
// instruction exception when not in debug mode. An EBREAK that does not
// enter debug mode is issued as a breakpoint exception.
// The debug behaviour follows the document. Normal issue (decode, operand
// fetch, reservation stations) belongs to the rest of the core and is reduced
// here to a pass-through of the decoded instruction class and PC.
module issue_debug_cu
  import debug_pkg::*;
(
  input  logic            clk_i,
  input  logic            rst_ni,
  // issue queue head, already classified by the issue decoder
  input  logic            iq_valid_i,
  output logic            iq_ready_o,
  input  instr_kind_t     iq_kind_i,
  input  logic [XLEN-1:0] iq_pc_i,
  // state of the core
  input  logic            dm_i,
  input  logic            ebreakm_i,
  input  logic            mispredict_i,
  // debug requests
  input  logic            debug_req_i,
  input  logic            sampler_clr_i,
  output logic            debug_pending_o,
  // ROB / commit stage
  output logic            comm_valid_o,
  input  logic            comm_ready_i,
  output rob_entry_t      comm_entry_o,
  output logic            issue_debug_sel_o,
  input  logic            comm_resume_i
);
  issue_state_t state_q, state_d;
  logic         sampler_q, debug_req_clr, any_debug_req;
  rob_entry_t   normal_entry, debug_entry;

  assign any_debug_req   = (debug_req_i | sampler_q) & ~dm_i;
  assign debug_pending_o = sampler_q;

  // Debug Sampler
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)                             sampler_q <= 1'b0;
    else if (debug_req_clr || sampler_clr_i) sampler_q <= 1'b0;
    else if (debug_req_i && !dm_i)           sampler_q <= 1'b1;
  end

  // Entry of the instruction at the head of the issue queue
  always_comb begin
    normal_entry            = '0;
    normal_entry.kind       = iq_kind_i;
    normal_entry.curr_pc    = iq_pc_i;
    unique case (iq_kind_i)
      INSTR_EBREAK: begin
        normal_entry.order_crit    = 1'b1;
        normal_entry.skip_eu       = 1'b1;
        normal_entry.except_raised = 1'b1;
        normal_entry.except_code   = E_BREAKPOINT;
      end
      INSTR_DRET: begin
        normal_entry.order_crit    = 1'b1;
        normal_entry.skip_eu       = 1'b1;
        normal_entry.except_raised = ~dm_i;
        normal_entry.except_code   = E_ILLEGAL_INSTRUCTION;
      end
      INSTR_ECALL: begin
        normal_entry.order_crit    = 1'b1;
        normal_entry.skip_eu       = 1'b1;
        normal_entry.except_raised = 1'b1;
        normal_entry.except_code   = E_ECALL_M;
      end
      INSTR_MRET: begin
        normal_entry.order_crit = 1'b1;
        normal_entry.skip_eu    = 1'b1;
      end
      default: ;
    endcase
  end

  // Dummy entry carrying a halt request
  always_comb begin
    debug_entry               = '0;
    debug_entry.order_crit    = 1'b1;
    debug_entry.except_raised = 1'b1;
    debug_entry.except_code   = E_DEBUG;
    debug_entry.curr_pc       = iq_pc_i;
  end

  always_comb begin
    state_d           = state_q;
    iq_ready_o        = 1'b0;
    comm_valid_o      = 1'b0;
    issue_debug_sel_o = 1'b0;
    debug_req_clr     = 1'b0;
    unique case (state_q)
      S_ISSUE: begin
        if (!mispredict_i && iq_valid_i) begin
          if (iq_kind_i == INSTR_EBREAK && ebreakm_i && !dm_i) state_d = S_ISSUE_EBREAK_DM;
          else if (any_debug_req)                              state_d = S_ISSUE_DEBUG;
          else begin
            comm_valid_o = 1'b1;
            iq_ready_o   = comm_ready_i;
          end
        end
      end
      S_ISSUE_DEBUG: begin
        comm_valid_o      = 1'b1;
        issue_debug_sel_o = 1'b1;
        debug_req_clr     = comm_ready_i;
        if (comm_ready_i) state_d = S_STALL;
      end
      S_ISSUE_EBREAK_DM: begin
        comm_valid_o  = 1'b1;
        iq_ready_o    = comm_ready_i;
        debug_req_clr = comm_ready_i;
        if (comm_ready_i) state_d = S_STALL;
      end
      S_STALL: if (comm_resume_i) state_d = S_ISSUE;
      default: state_d = S_ISSUE;
    endcase
  end

  assign comm_entry_o = issue_debug_sel_o ? debug_entry : normal_entry;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) state_q <= S_ISSUE;
    else         state_q <= state_d;
  end
endmodule
