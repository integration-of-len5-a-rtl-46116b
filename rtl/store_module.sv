// store_module: STORE port of the LEN5 <-> X-HEEP bridge.
//
// Same control structure as load_module: grant_cu issues one bus write on
// port 1 (WORD, HALFWORD, BYTE) or two on ports 0 and 1 (DOUBLEWORD) and
// pushes {be, tag} into the response FIFO on the first grant; addr_splitter
// makes the addresses. The write data and byte enables are produced in the
// address phase by data_aligner from the live LEN5 inputs, which LEN5 holds
// until len5_gnt, so no data buffer is needed. rvalid_cu, fed with the size
// from the FIFO, merges the two write acknowledgements into one len5_rvalid
// and forwards exceptions; its buffer and mux controls are unused here.
// Timing: len5_gnt with the last bus grant, len5_rvalid with the last bus
// rvalid. No flush, as in the document; FIFO depth is this design's choice,
// as is holding off a new request while the FIFO is full.
module store_module
  import bridge_pkg::*;
#(
  parameter int unsigned TAG_W      = 4,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  // LEN5 side
  input  logic                 len5_req_i,
  output logic                 len5_gnt_o,
  input  logic [LEN5_XLEN-1:0] len5_addr_i,
  input  logic                 len5_we_i,
  input  logic [7:0]           len5_be_i,
  input  logic [LEN5_XLEN-1:0] len5_wdata_i,
  input  logic [TAG_W-1:0]     len5_tag_i,
  output logic                 len5_rvalid_o,
  output logic [TAG_W-1:0]     len5_tag_o,
  output logic                 len5_except_raised_o,
  // bus port 0 (low word)
  output logic                 bus_req0_o,
  input  logic                 bus_gnt0_i,
  output logic [BUS_W-1:0]     bus_addr0_o,
  output logic                 bus_we0_o,
  output logic [3:0]           bus_be0_o,
  output logic [31:0]          bus_wdata0_o,
  input  logic                 bus_rvalid0_i,
  input  logic                 bus_except_raised0_i,
  // bus port 1 (high word, or the only word)
  output logic                 bus_req1_o,
  input  logic                 bus_gnt1_i,
  output logic [BUS_W-1:0]     bus_addr1_o,
  output logic                 bus_we1_o,
  output logic [3:0]           bus_be1_o,
  output logic [31:0]          bus_wdata1_o,
  input  logic                 bus_rvalid1_i,
  input  logic                 bus_except_raised1_i
);
  typedef struct packed {
    logic [7:0]       be;
    logic [TAG_W-1:0] tag;
  } st_entry_t;

  st_entry_t fifo_in, fifo_out;
  logic      push_fifo, fifo_empty, fifo_full;
  logic      unused_reg_en, unused_reg_mux, unused_exit0, unused_exit1;

  grant_cu u_grant_cu (
    .clk_i, .rst_ni,
    .flush_i    (1'b0),
    .len5_req_i (len5_req_i & !fifo_full),
    .len5_be_i,
    .bus_gnt0_i, .bus_gnt1_i,
    .bus_req0_o, .bus_req1_o,
    .len5_gnt_o,
    .push_fifo_o(push_fifo)
  );

  addr_splitter u_addr_splitter (
    .len5_addr_i, .len5_be_i, .bus_addr0_o, .bus_addr1_o
  );

  data_aligner u_data_aligner (
    .len5_wdata_i,
    .len5_be_i,
    .addr_lsb_i(len5_addr_i[1:0]),
    .bus_wdata0_o, .bus_wdata1_o, .bus_be0_o, .bus_be1_o
  );

  assign fifo_in = '{be: len5_be_i, tag: len5_tag_i};

  bridge_fifo #(.DATA_W($bits(st_entry_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk_i, .rst_ni,
    .flush_i(1'b0),
    .push_i (push_fifo),
    .data_i (fifo_in),
    .pop_i  (len5_rvalid_o),
    .data_o (fifo_out),
    .empty_o(fifo_empty),
    .full_o (fifo_full)
  );

  rvalid_cu u_rvalid_cu (
    .clk_i, .rst_ni,
    .flush_i        (1'b0),
    .fifo_be_i      (fifo_out.be),
    .bus_rvalid0_i, .bus_rvalid1_i,
    .bus_except0_i  (bus_except_raised0_i),
    .bus_except1_i  (bus_except_raised1_i),
    .len5_rvalid_o,
    .reg_en_o       (unused_reg_en),
    .reg_ctr_mux_o  (unused_reg_mux),
    .exit0_ctr_mux_o(unused_exit0),
    .exit1_ctr_mux_o(unused_exit1),
    .len5_except_o  (len5_except_raised_o)
  );

  assign len5_tag_o = fifo_out.tag;
  assign bus_we0_o  = len5_we_i;
  assign bus_we1_o  = len5_we_i;

  a_resp_has_entry: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                     len5_rvalid_o |-> !fifo_empty);
  a_fifo_room: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                push_fifo |-> !fifo_full);
endmodule
