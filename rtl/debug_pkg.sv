// debug_pkg: types and constants of the core's debug-mode support.
//
// CSR addresses (DCSR, DPC, DSCRATCH0/1 are the RISC-V debug specification
// addresses; the custom dm flag is placed at 0x7C0 by this design), exception
// codes (E_DEBUG is a custom code carried by the dummy ROB entry of a halt
// request; its value 24 is this design's choice), debug-entry causes, the
// simplified ROB entry passed from issue to commit and the commit decoder's
// instruction classes.
package debug_pkg;

  localparam int unsigned XLEN = 64;

  localparam logic [11:0] CSR_DCSR      = 12'h7B0;
  localparam logic [11:0] CSR_DPC       = 12'h7B1;
  localparam logic [11:0] CSR_DSCRATCH0 = 12'h7B2;
  localparam logic [11:0] CSR_DSCRATCH1 = 12'h7B3;
  localparam logic [11:0] CSR_DM        = 12'h7C0;

  localparam logic [4:0] E_ILLEGAL_INSTRUCTION = 5'd2;
  localparam logic [4:0] E_BREAKPOINT          = 5'd3;
  localparam logic [4:0] E_ECALL_M             = 5'd11;
  localparam logic [4:0] E_DEBUG               = 5'd24;

  localparam logic [2:0] CAUSE_EBREAK  = 3'd1;
  localparam logic [2:0] CAUSE_HALTREQ = 3'd3;
  localparam logic [1:0] PRV_M         = 2'd3;

  // Instruction classes the issue and commit decoders distinguish
  typedef enum logic [2:0] {
    INSTR_OTHER,
    INSTR_EBREAK,
    INSTR_ECALL,
    INSTR_MRET,
    INSTR_DRET
  } instr_kind_t;

  // Fields of a ROB entry that the debug logic uses
  typedef struct packed {
    instr_kind_t     kind;
    logic            order_crit;
    logic            skip_eu;
    logic            except_raised;
    logic [4:0]      except_code;
    logic [XLEN-1:0] curr_pc;
  } rob_entry_t;

  typedef enum logic [2:0] {
    COMM_TYPE_NONE,
    COMM_TYPE_EXCEPT,
    COMM_TYPE_EBREAK,
    COMM_TYPE_ECALL,
    COMM_TYPE_MRET,
    COMM_TYPE_DRET
  } comm_type_t;

  typedef enum logic [1:0] {
    S_ISSUE,
    S_ISSUE_DEBUG,
    S_ISSUE_EBREAK_DM,
    S_STALL
  } issue_state_t;

  typedef enum logic [4:0] {
    COMMIT_IDLE,
    COMMIT_EXCEPT,
    EXCEPT_LOAD_PC,
    COMMIT_MRET,
    COMMIT_DEBUG,
    COMMIT_DEBUG_SAVE_PC,
    DEBUG_WRITE_CODE,
    DEBUG_LOAD_PC,
    CLEAR_COMM_REG,
    COMMIT_EXCEPT_DM,
    EXCEPT_LOAD_PC_DM,
    COMMIT_ECALL_DM,
    COMMIT_MRET_DM,
    COMMIT_EBREAK_DM,
    COMMIT_EBREAK_FORCE_DM,
    EBREAK_SAVE_PC,
    EBREAK_WRITE_CODE,
    COMMIT_DRET,
    DRET_LOAD_PC
  } commit_state_t;

  typedef enum logic [2:0] {
    PC_SEL_MTVEC,
    PC_SEL_MEPC,
    PC_SEL_DM_HALT,
    PC_SEL_DM_EXCEPT,
    PC_SEL_DPC
  } pc_sel_t;

endpackage
