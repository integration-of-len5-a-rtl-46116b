// bridge: interface between the 64-bit LEN5 core and the 32-bit X-HEEP bus.
//
// Three independent modules side by side: instr_module for instruction
// fetches (one bus port), load_module and store_module for data (two bus
// ports each, so a DOUBLEWORD can be issued as two simultaneous WORD
// transactions on a multi-port bus; X-HEEP serialises them in a crossbar).
// LEN5-side ports are OBI signals with a tag; bus-side ports are packed
// obi_req_t/obi_rsp_t structs. flush only reaches the instruction module:
// loads and stores already issued must complete, as the document states.
// Bus port numbering: ld/st index 0 is the low word, index 1 the high word
// or the single word of a 32-bit access.
module bridge
  import bridge_pkg::*;
#(
  parameter int unsigned TAG_W      = 4,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  logic                 flush_i,
  // LEN5 instruction port
  input  logic                 instr_req_i,
  output logic                 instr_gnt_o,
  input  logic [LEN5_XLEN-1:0] instr_addr_i,
  input  logic                 instr_we_i,
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
  input  logic                 ld_we_i,
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
  input  logic                 st_we_i,
  input  logic [7:0]           st_be_i,
  input  logic [LEN5_XLEN-1:0] st_wdata_i,
  input  logic [TAG_W-1:0]     st_tag_i,
  output logic                 st_rvalid_o,
  output logic [TAG_W-1:0]     st_tag_o,
  output logic                 st_except_raised_o,
  // bus ports
  output obi_req_t             bus_instr_req_o,
  input  obi_rsp_t             bus_instr_rsp_i,
  output obi_req_t [1:0]       bus_ld_req_o,
  input  obi_rsp_t [1:0]       bus_ld_rsp_i,
  output obi_req_t [1:0]       bus_st_req_o,
  input  obi_rsp_t [1:0]       bus_st_rsp_i
);
  instr_module #(.TAG_W(TAG_W), .FIFO_DEPTH(FIFO_DEPTH)) u_instr (
    .clk_i, .rst_ni, .flush_i,
    .len5_req_i          (instr_req_i),
    .len5_gnt_o          (instr_gnt_o),
    .len5_addr_i         (instr_addr_i),
    .len5_we_i           (instr_we_i),
    .len5_tag_i          (instr_tag_i),
    .len5_rready_i       (instr_rready_i),
    .len5_rvalid_o       (instr_rvalid_o),
    .len5_rdata_o        (instr_rdata_o),
    .len5_tag_o          (instr_tag_o),
    .len5_except_raised_o(instr_except_raised_o),
    .len5_except_code_o  (instr_except_code_o),
    .bus_req_o           (bus_instr_req_o.req),
    .bus_gnt_i           (bus_instr_rsp_i.gnt),
    .bus_addr_o          (bus_instr_req_o.addr),
    .bus_we_o            (bus_instr_req_o.we),
    .bus_be_o            (bus_instr_req_o.be),
    .bus_rvalid_i        (bus_instr_rsp_i.rvalid),
    .bus_rdata_i         (bus_instr_rsp_i.rdata),
    .bus_except_raised_i (bus_instr_rsp_i.except_raised)
  );
  assign bus_instr_req_o.wdata = '0;

  load_module #(.TAG_W(TAG_W), .FIFO_DEPTH(FIFO_DEPTH)) u_load (
    .clk_i, .rst_ni,
    .len5_req_i          (ld_req_i),
    .len5_gnt_o          (ld_gnt_o),
    .len5_addr_i         (ld_addr_i),
    .len5_we_i           (ld_we_i),
    .len5_be_i           (ld_be_i),
    .len5_tag_i          (ld_tag_i),
    .len5_rvalid_o       (ld_rvalid_o),
    .len5_rdata_o        (ld_rdata_o),
    .len5_tag_o          (ld_tag_o),
    .len5_except_raised_o(ld_except_raised_o),
    .bus_req0_o          (bus_ld_req_o[0].req),
    .bus_gnt0_i          (bus_ld_rsp_i[0].gnt),
    .bus_addr0_o         (bus_ld_req_o[0].addr),
    .bus_we0_o           (bus_ld_req_o[0].we),
    .bus_be0_o           (bus_ld_req_o[0].be),
    .bus_rvalid0_i       (bus_ld_rsp_i[0].rvalid),
    .bus_rdata0_i        (bus_ld_rsp_i[0].rdata),
    .bus_except_raised0_i(bus_ld_rsp_i[0].except_raised),
    .bus_req1_o          (bus_ld_req_o[1].req),
    .bus_gnt1_i          (bus_ld_rsp_i[1].gnt),
    .bus_addr1_o         (bus_ld_req_o[1].addr),
    .bus_we1_o           (bus_ld_req_o[1].we),
    .bus_be1_o           (bus_ld_req_o[1].be),
    .bus_rvalid1_i       (bus_ld_rsp_i[1].rvalid),
    .bus_rdata1_i        (bus_ld_rsp_i[1].rdata),
    .bus_except_raised1_i(bus_ld_rsp_i[1].except_raised)
  );
  assign bus_ld_req_o[0].wdata = '0;
  assign bus_ld_req_o[1].wdata = '0;

  store_module #(.TAG_W(TAG_W), .FIFO_DEPTH(FIFO_DEPTH)) u_store (
    .clk_i, .rst_ni,
    .len5_req_i          (st_req_i),
    .len5_gnt_o          (st_gnt_o),
    .len5_addr_i         (st_addr_i),
    .len5_we_i           (st_we_i),
    .len5_be_i           (st_be_i),
    .len5_wdata_i        (st_wdata_i),
    .len5_tag_i          (st_tag_i),
    .len5_rvalid_o       (st_rvalid_o),
    .len5_tag_o          (st_tag_o),
    .len5_except_raised_o(st_except_raised_o),
    .bus_req0_o          (bus_st_req_o[0].req),
    .bus_gnt0_i          (bus_st_rsp_i[0].gnt),
    .bus_addr0_o         (bus_st_req_o[0].addr),
    .bus_we0_o           (bus_st_req_o[0].we),
    .bus_be0_o           (bus_st_req_o[0].be),
    .bus_wdata0_o        (bus_st_req_o[0].wdata),
    .bus_rvalid0_i       (bus_st_rsp_i[0].rvalid),
    .bus_except_raised0_i(bus_st_rsp_i[0].except_raised),
    .bus_req1_o          (bus_st_req_o[1].req),
    .bus_gnt1_i          (bus_st_rsp_i[1].gnt),
    .bus_addr1_o         (bus_st_req_o[1].addr),
    .bus_we1_o           (bus_st_req_o[1].we),
    .bus_be1_o           (bus_st_req_o[1].be),
    .bus_wdata1_o        (bus_st_req_o[1].wdata),
    .bus_rvalid1_i       (bus_st_rsp_i[1].rvalid),
    .bus_except_raised1_i(bus_st_rsp_i[1].except_raised)
  );
endmodule
