// len5_xheep_top: LEN5-side interface logic for an X-HEEP system.
//
// Three parts side by side:
//  * Bridge and crossbar. The bridge adapts the core's 64-bit instruction,
//    load and store ports to 32-bit OBI; its instruction port goes straight
//    to the bus instruction port, and its four data ports (load low/high,
//    store low/high, masters 0..3) are serialised by a 4-to-1 round-robin
//    crossbar onto the single 32-bit data port of the bus. The bridge's
//    instruction flush is the external flush_i or the front-end flush issued
//    by the debug commit logic.
//  * Debug support: the Debug Sampler and debug issue states, a commit unit
//    with the debug-entry/exit sequences, and the debug CSRs. The reorder
//    buffer between issue and commit belongs to the core and is stood in for
//    by an in-order queue (flushed with the execution pipeline) so the issue
//    and commit units can be exercised together.
//  * The JTAG TAP, with its boundary-scan controls brought out.
// All ports are plain signals or the packed OBI structs of bridge_pkg.
module len5_xheep_top
  import bridge_pkg::*;
  import debug_pkg::rob_entry_t;
  import debug_pkg::instr_kind_t;
  import debug_pkg::pc_sel_t;
  import debug_pkg::commit_state_t;
  import jtag_pkg::IR_W;
#(
  parameter int unsigned TAG_W      = 4,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned ROB_DEPTH  = 4
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  logic                 flush_i,
  // LEN5 instruction port
  input  logic                 instr_req_i,
  output logic                 instr_gnt_o,
  input  logic [LEN5_XLEN-1:0] instr_addr_i,
  input  logic [TAG_W-1:0]     instr_tag_i,
  input  logic                 instr_rready_i,
  output logic                 instr_rvalid_o,
  output logic [31:0]          instr_rdata_o,
  output logic [TAG_W-1:0]     instr_tag_o,
  output logic                 instr_except_raised_o,
  output logic [EXC_W-1:0]     instr_except_code_o,
  // LEN5 load port
  input  logic                 ld_req_i,
  output logic                 ld_gnt_o,
  input  logic [LEN5_XLEN-1:0] ld_addr_i,
  input  logic [7:0]           ld_be_i,
  input  logic [TAG_W-1:0]     ld_tag_i,
  output logic                 ld_rvalid_o,
  output logic [LEN5_XLEN-1:0] ld_rdata_o,
  output logic [TAG_W-1:0]     ld_tag_o,
  output logic                 ld_except_raised_o,
  // LEN5 store port
  input  logic                 st_req_i,
  output logic                 st_gnt_o,
  input  logic [LEN5_XLEN-1:0] st_addr_i,
  input  logic [7:0]           st_be_i,
  input  logic [LEN5_XLEN-1:0] st_wdata_i,
  input  logic [TAG_W-1:0]     st_tag_i,
  output logic                 st_rvalid_o,
  output logic [TAG_W-1:0]     st_tag_o,
  output logic                 st_except_raised_o,
  // X-HEEP bus: instruction port and single data port
  output obi_req_t             bus_instr_req_o,
  input  obi_rsp_t             bus_instr_rsp_i,
  output obi_req_t             bus_data_req_o,
  input  obi_rsp_t             bus_data_rsp_i,
  // debug: issue queue head and core state
  input  logic                 iq_valid_i,
  output logic                 iq_ready_o,
  input  instr_kind_t          iq_kind_i,
  input  logic [63:0]          iq_pc_i,
  input  logic                 mispredict_i,
  input  logic                 debug_req_i,
  input  logic [63:0]          mtvec_i,
  input  logic [63:0]          mepc_i,
  input  logic [63:0]          dm_halt_addr_i,
  input  logic [63:0]          dm_exception_addr_i,
  // debug: CSR instruction access
  input  logic                 csr_valid_i,
  input  logic [11:0]          csr_addr_i,
  input  logic                 csr_we_i,
  input  logic [63:0]          csr_wdata_i,
  output logic [63:0]          csr_rdata_o,
  output logic                 csr_hit_o,
  output logic                 csr_illegal_o,
  // debug: results
  output logic                 dm_o,
  output logic [31:0]          dcsr_o,
  output logic [63:0]          dpc_o,
  output logic                 pc_load_o,
  output pc_sel_t              pc_sel_o,
  output logic [63:0]          pc_o,
  output logic                 flush_exec_o,
  output logic                 flush_fe_o,
  output logic                 mepc_we_o,
  output logic [63:0]          mepc_wdata_o,
  output logic                 mcause_we_o,
  output logic [4:0]           mcause_wdata_o,
  output logic                 comm_reg_clr_o,
  output logic                 commit_pop_o,
  output commit_state_t        commit_state_o,
  // JTAG
  input  logic                 tck_i,
  input  logic                 trst_ni,
  input  logic                 tms_i,
  input  logic                 td_i,
  output logic                 td_o,
  output logic                 bsr_data_o,
  input  logic                 bsr_data_i,
  output logic                 bsr_shift_o,
  output logic                 bsr_capture_o,
  output logic                 bsr_update_o,
  output logic                 bsr_enable_o,
  output logic [IR_W-1:0]      jtag_instr_o
);
  // ---------------------------------------------------------------- bridge
  obi_req_t [1:0] ld_req, st_req;
  obi_rsp_t [1:0] ld_rsp, st_rsp;
  obi_req_t [3:0] xbar_req;
  obi_rsp_t [3:0] xbar_rsp;
  logic           bridge_flush;

  assign bridge_flush = flush_i | flush_fe_o;

  bridge #(.TAG_W(TAG_W), .FIFO_DEPTH(FIFO_DEPTH)) u_bridge (
    .clk_i, .rst_ni,
    .flush_i              (bridge_flush),
    .instr_req_i, .instr_gnt_o, .instr_addr_i,
    .instr_we_i           (1'b0),
    .instr_tag_i, .instr_rready_i, .instr_rvalid_o, .instr_rdata_o, .instr_tag_o,
    .instr_except_raised_o, .instr_except_code_o,
    .ld_req_i, .ld_gnt_o, .ld_addr_i,
    .ld_we_i              (1'b0),
    .ld_be_i, .ld_tag_i, .ld_rvalid_o, .ld_rdata_o, .ld_tag_o, .ld_except_raised_o,
    .st_req_i, .st_gnt_o, .st_addr_i,
    .st_we_i              (1'b1),
    .st_be_i, .st_wdata_i, .st_tag_i, .st_rvalid_o, .st_tag_o, .st_except_raised_o,
    .bus_instr_req_o, .bus_instr_rsp_i,
    .bus_ld_req_o         (ld_req),
    .bus_ld_rsp_i         (ld_rsp),
    .bus_st_req_o         (st_req),
    .bus_st_rsp_i         (st_rsp)
  );

  assign xbar_req = {st_req[1], st_req[0], ld_req[1], ld_req[0]};
  assign ld_rsp   = xbar_rsp[1:0];
  assign st_rsp   = xbar_rsp[3:2];

  obi_xbar #(.N_MASTERS(4)) u_xbar (
    .clk_i, .rst_ni,
    .m_req_i(xbar_req),
    .m_rsp_o(xbar_rsp),
    .s_req_o(bus_data_req_o),
    .s_rsp_i(bus_data_rsp_i)
  );

  // ----------------------------------------------------------------- debug
  logic       dm, ebreakm, sampler_clr, comm_resume;
  logic       comm_valid, comm_ready, issue_debug_sel, debug_pending;
  rob_entry_t comm_entry, head_entry;
  logic       rob_empty, rob_full, rob_pop;
  logic       dm_we, dm_wdata, dpc_we, debug_csr_write;
  logic [63:0] dpc_wdata;
  logic [2:0] dcsr_cause;
  logic [1:0] dcsr_prv;

  issue_debug_cu u_issue_dbg (
    .clk_i, .rst_ni,
    .iq_valid_i, .iq_ready_o, .iq_kind_i, .iq_pc_i,
    .dm_i             (dm),
    .ebreakm_i        (ebreakm),
    .mispredict_i,
    .debug_req_i,
    .sampler_clr_i    (sampler_clr),
    .debug_pending_o  (debug_pending),
    .comm_valid_o     (comm_valid),
    .comm_ready_i     (comm_ready),
    .comm_entry_o     (comm_entry),
    .issue_debug_sel_o(issue_debug_sel),
    .comm_resume_i    (comm_resume)
  );

  assign comm_ready = !rob_full;

  // The commit unit latches the head (PC, exception code) when a sequence
  // starts, acting as the commit register. On an EBREAK forced into debug
  // mode the execution flush comes two cycles before the commit, so by then
  // the queue may be empty and the late pop has nothing left to remove.

  bridge_fifo #(.DATA_W($bits(rob_entry_t)), .DEPTH(ROB_DEPTH)) u_rob (
    .clk_i, .rst_ni,
    .flush_i(flush_exec_o),
    .push_i (comm_valid & comm_ready),
    .data_i (comm_entry),
    .pop_i  (rob_pop & !rob_empty),
    .data_o (head_entry),
    .empty_o(rob_empty),
    .full_o (rob_full)
  );

  commit_debug_cu u_commit_dbg (
    .clk_i, .rst_ni,
    .head_valid_i       (!rob_empty),
    .head_entry_i       (head_entry),
    .rob_pop_o          (rob_pop),
    .dm_i               (dm),
    .ebreakm_i          (ebreakm),
    .dpc_i              (dpc_o),
    .mtvec_i, .mepc_i, .dm_halt_addr_i, .dm_exception_addr_i,
    .dm_we_o            (dm_we),
    .dm_wdata_o         (dm_wdata),
    .dpc_we_o           (dpc_we),
    .dpc_wdata_o        (dpc_wdata),
    .debug_csr_write_o  (debug_csr_write),
    .dcsr_cause_o       (dcsr_cause),
    .dcsr_prv_o         (dcsr_prv),
    .mepc_we_o, .mepc_wdata_o, .mcause_we_o, .mcause_wdata_o,
    .flush_exec_o, .flush_fe_o, .pc_load_o, .pc_sel_o, .pc_o,
    .sampler_clr_o      (sampler_clr),
    .comm_reg_clr_o,
    .comm_resume_o      (comm_resume),
    .state_o            (commit_state_o)
  );
  assign commit_pop_o = rob_pop;

  debug_csr u_debug_csr (
    .clk_i, .rst_ni,
    .csr_valid_i, .csr_addr_i, .csr_we_i, .csr_wdata_i, .csr_rdata_o, .csr_hit_o, .csr_illegal_o,
    .dbg_dm_we_i      (dm_we),
    .dbg_dm_wdata_i   (dm_wdata),
    .dbg_dpc_we_i     (dpc_we),
    .dbg_dpc_wdata_i  (dpc_wdata),
    .debug_csr_write_i(debug_csr_write),
    .dbg_cause_i      (dcsr_cause),
    .dbg_prv_i        (dcsr_prv),
    .dm_o             (dm),
    .dpc_o,
    .ebreakm_o        (ebreakm),
    .dcsr_o
  );
  assign dm_o = dm;

  // ------------------------------------------------------------------ JTAG
  jtag_tap u_tap (
    .tck_i, .trst_ni, .tms_i, .td_i, .td_o,
    .bsr_data_o, .bsr_data_i, .bsr_shift_o, .bsr_capture_o, .bsr_update_o, .bsr_enable_o,
    .instr_o(jtag_instr_o)
  );

  // Observability only
  logic unused;
  assign unused = ^{issue_debug_sel, debug_pending};
endmodule
