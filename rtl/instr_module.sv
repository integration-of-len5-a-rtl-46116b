// instr_module: instruction port of the LEN5 <-> X-HEEP bridge.
//
// LEN5 may deassert len5_rready while an instruction is in flight; the X-HEEP
// bus has no rready and would drop that instruction. This module keeps it:
// instr_cu writes the instruction and its exception bit into a 33-bit buffer
// the cycle LEN5 refuses it and then presents the buffer until LEN5 takes it,
// while the request and grant are gated with len5_rready so no new fetch is
// issued meanwhile. Two muxes driven by buff_sel select the bus or the buffer
// for the instruction and exception outputs. A tag FIFO stores len5_tag when
// the address phase completes (bus_req & len5_gnt) and returns it with the
// instruction, popped when len5_rvalid & len5_rready. flush empties the CU
// state, the buffer and the tag FIFO.
// Address: only the 32 LSBs reach the bus; be is fixed to 4'hF; we passes
// through. Timing: request, grant and rvalid paths are combinational (Mealy),
// as in the document. The exception code is the constant E_I_ACCESS_FAULT.
// A new fetch is held off while the tag FIFO is full (this design's choice).
// The one-entry buffer covers one fetch in flight when rready drops: a
// second response arriving while a word is held would be lost.
module instr_module
  import bridge_pkg::*;
#(
  parameter int unsigned TAG_W      = 4,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  logic                 flush_i,
  // LEN5 side
  input  logic                 len5_req_i,
  output logic                 len5_gnt_o,
  input  logic [LEN5_XLEN-1:0] len5_addr_i,
  input  logic                 len5_we_i,
  input  logic [TAG_W-1:0]     len5_tag_i,
  input  logic                 len5_rready_i,
  output logic                 len5_rvalid_o,
  output logic [31:0]          len5_rdata_o,
  output logic [TAG_W-1:0]     len5_tag_o,
  output logic                 len5_except_raised_o,
  output logic [EXC_W-1:0]     len5_except_code_o,
  // bus side
  output logic                 bus_req_o,
  input  logic                 bus_gnt_i,
  output logic [BUS_W-1:0]     bus_addr_o,
  output logic                 bus_we_o,
  output logic [3:0]           bus_be_o,
  input  logic                 bus_rvalid_i,
  input  logic [31:0]          bus_rdata_i,
  input  logic                 bus_except_raised_i
);
  logic        buff_en, buff_sel;
  logic [32:0] buff_q;   // {exception, instruction}
  logic        fifo_empty, fifo_full;

  instr_cu u_cu (
    .clk_i, .rst_ni, .flush_i,
    .len5_req_i   (len5_req_i & !fifo_full),
    .len5_rready_i, .bus_gnt_i, .bus_rvalid_i,
    .bus_req_o, .len5_gnt_o, .len5_rvalid_o,
    .buff_en_o (buff_en),
    .buff_sel_o(buff_sel)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)      buff_q <= '0;
    else if (flush_i) buff_q <= '0;
    else if (buff_en) buff_q <= {bus_except_raised_i, bus_rdata_i};
  end

  assign len5_rdata_o         = buff_sel ? buff_q[31:0] : bus_rdata_i;
  assign len5_except_raised_o = buff_sel ? buff_q[32]   : bus_except_raised_i;
  assign len5_except_code_o   = E_I_ACCESS_FAULT;

  bridge_fifo #(.DATA_W(TAG_W), .DEPTH(FIFO_DEPTH)) u_tag_fifo (
    .clk_i, .rst_ni, .flush_i,
    .push_i (bus_req_o & len5_gnt_o),
    .data_i (len5_tag_i),
    .pop_i  (len5_rvalid_o & len5_rready_i),
    .data_o (len5_tag_o),
    .empty_o(fifo_empty),
    .full_o (fifo_full)
  );

  assign bus_addr_o = len5_addr_i[BUS_W-1:0];
  assign bus_we_o   = len5_we_i;
  assign bus_be_o   = 4'hF;

  // Every instruction handed to LEN5 belongs to an accepted request
  a_rvalid_has_tag: assert property (@(posedge clk_i) disable iff (!rst_ni || flush_i)
                                     (len5_rvalid_o && len5_rready_i) |-> !fifo_empty);
  a_tag_room: assert property (@(posedge clk_i) disable iff (!rst_ni || flush_i)
                               (bus_req_o && len5_gnt_o) |-> !fifo_full);
endmodule
