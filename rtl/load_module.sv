// load_module: LOAD port of the LEN5 <-> X-HEEP bridge.
//
// Turns one LEN5 load (64-bit address, 8-bit size code, tag) into one bus
// transaction on port 1 (WORD, HALFWORD, BYTE) or two on ports 0 and 1
// (DOUBLEWORD: port 0 low word, port 1 high word). grant_cu runs the address
// phase and pushes {be, addr[1:0], tag} into the response FIFO on the first
// grant; addr_splitter makes the two addresses. In the response phase
// rvalid_cu reads the size from the FIFO head, saves a half that arrives
// alone in a 32-bit data buffer and steers byte_selector, which returns the
// merged or lane-selected data with len5_rvalid. The FIFO is popped with
// len5_rvalid. bus_be0 = be[3:0]; bus_be1 = be[7:4] for DOUBLEWORD, else
// be[3:0]; bus_we follows len5_we.
// Timing: len5_gnt comes in the cycle of the last bus grant and len5_rvalid
// in the cycle of the last bus rvalid (no added latency).
// A new request is held off while the response FIFO is full (this design's
// choice, so that no response can be lost). As in the document, this port has no flush and no rready; the FIFO depth
// is this design's choice.
module load_module
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
  input  logic [TAG_W-1:0]     len5_tag_i,
  output logic                 len5_rvalid_o,
  output logic [LEN5_XLEN-1:0] len5_rdata_o,
  output logic [TAG_W-1:0]     len5_tag_o,
  output logic                 len5_except_raised_o,
  // bus port 0 (low word)
  output logic                 bus_req0_o,
  input  logic                 bus_gnt0_i,
  output logic [BUS_W-1:0]     bus_addr0_o,
  output logic                 bus_we0_o,
  output logic [3:0]           bus_be0_o,
  input  logic                 bus_rvalid0_i,
  input  logic [31:0]          bus_rdata0_i,
  input  logic                 bus_except_raised0_i,
  // bus port 1 (high word, or the only word)
  output logic                 bus_req1_o,
  input  logic                 bus_gnt1_i,
  output logic [BUS_W-1:0]     bus_addr1_o,
  output logic                 bus_we1_o,
  output logic [3:0]           bus_be1_o,
  input  logic                 bus_rvalid1_i,
  input  logic [31:0]          bus_rdata1_i,
  input  logic                 bus_except_raised1_i
);
  typedef struct packed {
    logic [7:0]       be;
    logic [1:0]       addr_lsb;
    logic [TAG_W-1:0] tag;
  } ld_entry_t;

  ld_entry_t   fifo_in, fifo_out;
  logic        push_fifo, fifo_empty, fifo_full;
  logic        reg_en, reg_ctr_mux, exit0_ctr_mux, exit1_ctr_mux;
  logic [31:0] data_buffer_q;

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

  assign fifo_in = '{be: len5_be_i, addr_lsb: len5_addr_i[1:0], tag: len5_tag_i};

  bridge_fifo #(.DATA_W($bits(ld_entry_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
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
    .reg_en_o       (reg_en),
    .reg_ctr_mux_o  (reg_ctr_mux),
    .exit0_ctr_mux_o(exit0_ctr_mux),
    .exit1_ctr_mux_o(exit1_ctr_mux),
    .len5_except_o  (len5_except_raised_o)
  );

  // Data buffer: holds the half of a DOUBLEWORD that arrives first
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)     data_buffer_q <= '0;
    else if (reg_en) data_buffer_q <= reg_ctr_mux ? bus_rdata1_i : bus_rdata0_i;
  end

  byte_selector u_byte_selector (
    .bus_rdata0_i, .bus_rdata1_i,
    .buffer_i       (data_buffer_q),
    .exit0_ctr_mux_i(exit0_ctr_mux),
    .exit1_ctr_mux_i(exit1_ctr_mux),
    .be_i           (fifo_out.be),
    .addr_lsb_i     (fifo_out.addr_lsb),
    .len5_rdata_o
  );

  assign len5_tag_o = fifo_out.tag;
  assign bus_we0_o  = len5_we_i;
  assign bus_we1_o  = len5_we_i;
  assign bus_be0_o  = len5_be_i[3:0];
  assign bus_be1_o  = is_dword(len5_be_i) ? len5_be_i[7:4] : len5_be_i[3:0];

  a_resp_has_entry: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                     len5_rvalid_o |-> !fifo_empty);
  a_fifo_room: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                push_fifo |-> !fifo_full);
endmodule
