// commit_debug_cu: debug-mode part of the core's commit control unit.
//
// A commit decoder classifies the ROB head: ECALL, EBREAK with its
// breakpoint exception, any other exception (including the E_DEBUG dummy
// entry of a halt request), MRET, DRET or an ordinary instruction. Ordinary
// instructions are committed (rob_pop) in COMMIT_IDLE. The other classes run
// the multi-cycle sequences below; each step is one clock cycle, and the PC
// and exception code of the head are latched when a sequence starts.
//  halt request : COMMIT_DEBUG (dm := 1, flush pipeline, clear sampler) ->
//                 COMMIT_DEBUG_SAVE_PC (DPC := pc) -> DEBUG_WRITE_CODE (DCSR
//                 cause 3, prv M, flush front end) -> DEBUG_LOAD_PC (PC :=
//                 dm_halt_addr) -> CLEAR_COMM_REG (clear commit register,
//                 resume issue)
//  EBREAK, dm   : COMMIT_EBREAK_DM (commit, flush) -> DEBUG_LOAD_PC
//  EBREAK, !dm, ebreakm : COMMIT_EBREAK_FORCE_DM (dm := 1, flush, clear
//                 sampler) -> EBREAK_SAVE_PC -> EBREAK_WRITE_CODE (commit,
//                 cause 1, prv M, flush front end) -> DEBUG_LOAD_PC
//  exception in dm, ECALL/MRET in dm : COMMIT_EXCEPT_DM / COMMIT_ECALL_DM /
//                 COMMIT_MRET_DM (commit, flush, no CSR update) ->
//                 EXCEPT_LOAD_PC_DM (PC := dm_exception_addr) -> CLEAR_COMM_REG
//  exception (and EBREAK with ebreakm = 0, ECALL) outside dm : COMMIT_EXCEPT
//                 (MEPC, MCAUSE, flush) -> EXCEPT_LOAD_PC (PC := mtvec) ->
//                 CLEAR_COMM_REG
//  DRET         : COMMIT_DRET (commit, dm := 0, flush) -> DRET_LOAD_PC
//                 (PC := DPC)
//  MRET outside dm : COMMIT_MRET (commit, flush, PC := mepc)
// The debug sequences follow the document. Standard exception and MRET
// handling belong to the rest of the core and are reduced to the states
// above; mtvec is used in direct mode.
module commit_debug_cu
  import debug_pkg::*;
(
  input  logic            clk_i,
  input  logic            rst_ni,
  // ROB head
  input  logic            head_valid_i,
  input  rob_entry_t      head_entry_i,
  output logic            rob_pop_o,
  // CSR state
  input  logic            dm_i,
  input  logic            ebreakm_i,
  input  logic [XLEN-1:0] dpc_i,
  input  logic [XLEN-1:0] mtvec_i,
  input  logic [XLEN-1:0] mepc_i,
  input  logic [XLEN-1:0] dm_halt_addr_i,
  input  logic [XLEN-1:0] dm_exception_addr_i,
  // CSR writes
  output logic            dm_we_o,
  output logic            dm_wdata_o,
  output logic            dpc_we_o,
  output logic [XLEN-1:0] dpc_wdata_o,
  output logic            debug_csr_write_o,
  output logic [2:0]      dcsr_cause_o,
  output logic [1:0]      dcsr_prv_o,
  output logic            mepc_we_o,
  output logic [XLEN-1:0] mepc_wdata_o,
  output logic            mcause_we_o,
  output logic [4:0]      mcause_wdata_o,
  // pipeline control
  output logic            flush_exec_o,
  output logic            flush_fe_o,
  output logic            pc_load_o,
  output pc_sel_t         pc_sel_o,
  output logic [XLEN-1:0] pc_o,
  output logic            sampler_clr_o,
  output logic            comm_reg_clr_o,
  output logic            comm_resume_o,
  output commit_state_t   state_o
);
  commit_state_t   state_q, state_d;
  comm_type_t      comm_type;
  logic [XLEN-1:0] pc_q;
  logic [4:0]      code_q;
  logic            start;

  // Commit decoder
  always_comb begin
    comm_type = COMM_TYPE_NONE;
    if (head_entry_i.kind == INSTR_ECALL)                        comm_type = COMM_TYPE_ECALL;
    else if (head_entry_i.except_raised &&
             head_entry_i.kind == INSTR_EBREAK &&
             head_entry_i.except_code == E_BREAKPOINT)           comm_type = COMM_TYPE_EBREAK;
    else if (head_entry_i.except_raised)                         comm_type = COMM_TYPE_EXCEPT;
    else if (head_entry_i.kind == INSTR_MRET)                    comm_type = COMM_TYPE_MRET;
    else if (head_entry_i.kind == INSTR_DRET)                    comm_type = COMM_TYPE_DRET;
  end

  always_comb begin
    state_d           = state_q;
    start             = 1'b0;
    rob_pop_o         = 1'b0;
    dm_we_o           = 1'b0;
    dm_wdata_o        = 1'b0;
    dpc_we_o          = 1'b0;
    debug_csr_write_o = 1'b0;
    dcsr_cause_o      = '0;
    dcsr_prv_o        = PRV_M;
    mepc_we_o         = 1'b0;
    mcause_we_o       = 1'b0;
    flush_exec_o      = 1'b0;
    flush_fe_o        = 1'b0;
    pc_load_o         = 1'b0;
    pc_sel_o          = PC_SEL_MTVEC;
    sampler_clr_o     = 1'b0;
    comm_reg_clr_o    = 1'b0;
    comm_resume_o     = 1'b0;
    unique case (state_q)
      COMMIT_IDLE: if (head_valid_i) begin
        start = 1'b1;
        unique case (comm_type)
          COMM_TYPE_NONE:   rob_pop_o = 1'b1;
          COMM_TYPE_EXCEPT: begin
            if (head_entry_i.except_code == E_DEBUG) state_d = COMMIT_DEBUG;
            else if (dm_i)                           state_d = COMMIT_EXCEPT_DM;
            else                                     state_d = COMMIT_EXCEPT;
          end
          COMM_TYPE_EBREAK: begin
            if (dm_i)           state_d = COMMIT_EBREAK_DM;
            else if (ebreakm_i) state_d = COMMIT_EBREAK_FORCE_DM;
            else                state_d = COMMIT_EXCEPT;
          end
          COMM_TYPE_ECALL: state_d = dm_i ? COMMIT_ECALL_DM : COMMIT_EXCEPT;
          COMM_TYPE_MRET:  state_d = dm_i ? COMMIT_MRET_DM : COMMIT_MRET;
          COMM_TYPE_DRET:  state_d = COMMIT_DRET;
          default: ;
        endcase
      end
      // Debug entry on a halt request
      COMMIT_DEBUG: begin
        rob_pop_o     = 1'b1;
        dm_we_o       = 1'b1;
        dm_wdata_o    = 1'b1;
        flush_exec_o  = 1'b1;
        sampler_clr_o = 1'b1;
        state_d       = COMMIT_DEBUG_SAVE_PC;
      end
      COMMIT_DEBUG_SAVE_PC: begin
        dpc_we_o = 1'b1;
        state_d  = DEBUG_WRITE_CODE;
      end
      DEBUG_WRITE_CODE: begin
        debug_csr_write_o = 1'b1;
        dcsr_cause_o      = CAUSE_HALTREQ;
        flush_fe_o        = 1'b1;
        state_d           = DEBUG_LOAD_PC;
      end
      DEBUG_LOAD_PC: begin
        pc_load_o = 1'b1;
        pc_sel_o  = PC_SEL_DM_HALT;
        state_d   = CLEAR_COMM_REG;
      end
      CLEAR_COMM_REG: begin
        comm_reg_clr_o = 1'b1;
        comm_resume_o  = 1'b1;
        state_d        = COMMIT_IDLE;
      end
      // Standard exception
      COMMIT_EXCEPT: begin
        rob_pop_o    = 1'b1;
        mepc_we_o    = 1'b1;
        mcause_we_o  = 1'b1;
        flush_exec_o = 1'b1;
        flush_fe_o   = 1'b1;
        state_d      = EXCEPT_LOAD_PC;
      end
      EXCEPT_LOAD_PC: begin
        pc_load_o = 1'b1;
        pc_sel_o  = PC_SEL_MTVEC;
        state_d   = CLEAR_COMM_REG;
      end
      COMMIT_MRET: begin
        rob_pop_o    = 1'b1;
        flush_exec_o = 1'b1;
        flush_fe_o   = 1'b1;
        pc_load_o    = 1'b1;
        pc_sel_o     = PC_SEL_MEPC;
        state_d      = COMMIT_IDLE;
      end
      // Exceptions and privilege changes inside debug mode
      COMMIT_EXCEPT_DM, COMMIT_ECALL_DM, COMMIT_MRET_DM: begin
        rob_pop_o    = 1'b1;
        flush_exec_o = 1'b1;
        flush_fe_o   = 1'b1;
        state_d      = EXCEPT_LOAD_PC_DM;
      end
      EXCEPT_LOAD_PC_DM: begin
        pc_load_o = 1'b1;
        pc_sel_o  = PC_SEL_DM_EXCEPT;
        state_d   = CLEAR_COMM_REG;
      end
      // EBREAK
      COMMIT_EBREAK_DM: begin
        rob_pop_o    = 1'b1;
        flush_exec_o = 1'b1;
        flush_fe_o   = 1'b1;
        state_d      = DEBUG_LOAD_PC;
      end
      COMMIT_EBREAK_FORCE_DM: begin
        dm_we_o       = 1'b1;
        dm_wdata_o    = 1'b1;
        flush_exec_o  = 1'b1;
        sampler_clr_o = 1'b1;
        state_d       = EBREAK_SAVE_PC;
      end
      EBREAK_SAVE_PC: begin
        dpc_we_o = 1'b1;
        state_d  = EBREAK_WRITE_CODE;
      end
      EBREAK_WRITE_CODE: begin
        rob_pop_o         = 1'b1;
        debug_csr_write_o = 1'b1;
        dcsr_cause_o      = CAUSE_EBREAK;
        flush_fe_o        = 1'b1;
        state_d           = DEBUG_LOAD_PC;
      end
      // Debug exit
      COMMIT_DRET: begin
        rob_pop_o    = 1'b1;
        dm_we_o      = 1'b1;
        dm_wdata_o   = 1'b0;
        flush_exec_o = 1'b1;
        flush_fe_o   = 1'b1;
        state_d      = DRET_LOAD_PC;
      end
      DRET_LOAD_PC: begin
        pc_load_o = 1'b1;
        pc_sel_o  = PC_SEL_DPC;
        state_d   = COMMIT_IDLE;
      end
      default: state_d = COMMIT_IDLE;
    endcase
  end

  always_comb begin
    unique case (pc_sel_o)
      PC_SEL_MEPC:      pc_o = mepc_i;
      PC_SEL_DM_HALT:   pc_o = dm_halt_addr_i;
      PC_SEL_DM_EXCEPT: pc_o = dm_exception_addr_i;
      PC_SEL_DPC:       pc_o = dpc_i;
      default:          pc_o = mtvec_i;
    endcase
  end

  assign dpc_wdata_o    = pc_q;
  assign mepc_wdata_o   = pc_q;
  assign mcause_wdata_o = code_q;
  assign state_o        = state_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= COMMIT_IDLE;
      pc_q    <= '0;
      code_q  <= '0;
    end else begin
      state_q <= state_d;
      if (start) begin
        pc_q   <= head_entry_i.curr_pc;
        code_q <= head_entry_i.except_code;
      end
    end
  end
endmodule
