// byte_selector: builds the 64-bit LOAD result returned to LEN5.
//
// Combinational. DOUBLEWORD (be[7:4] all ones): two cascaded muxes. The first
// (exit0) joins a bus half with the data buffer: exit0 = 0 gives
// {buffer, rdata0} (port 1 arrived first), exit0 = 1 gives {rdata1, buffer}
// (port 0 arrived first). The second (exit1) chooses between that and
// {rdata1, rdata0} when both halves arrive together. Port 0 is the low word
// (little endian).
// 32-bit requests read the word from port 1. addr[1] moves the upper half
// word down to bits 15:0 (upper bits kept as they are); addr[0] then moves
// byte 1 of that down to bits 7:0. be[3:0] = 1111/0011/0001 picks the word,
// half-word or byte version; LEN5 sign- or zero-extends the low bits itself.
// The structure follows the document; zeroing bits 63:32 of a 32-bit result
// is this design's choice.
module byte_selector
  import bridge_pkg::*;
(
  input  logic [31:0]          bus_rdata0_i,
  input  logic [31:0]          bus_rdata1_i,
  input  logic [31:0]          buffer_i,
  input  logic                 exit0_ctr_mux_i,
  input  logic                 exit1_ctr_mux_i,
  input  logic [7:0]           be_i,
  input  logic [1:0]           addr_lsb_i,
  output logic [LEN5_XLEN-1:0] len5_rdata_o
);
  logic [63:0] pair, dword_data;
  logic [31:0] word, half_sel, byte_sel, narrow;

  assign pair       = exit0_ctr_mux_i ? {bus_rdata1_i, buffer_i} : {buffer_i, bus_rdata0_i};
  assign dword_data = exit1_ctr_mux_i ? {bus_rdata1_i, bus_rdata0_i} : pair;

  assign word     = bus_rdata1_i;
  assign half_sel = {word[31:16], addr_lsb_i[1] ? word[31:16] : word[15:0]};
  assign byte_sel = {half_sel[31:8], addr_lsb_i[0] ? half_sel[15:8] : half_sel[7:0]};

  always_comb begin
    unique case (be_i[3:0])
      4'b0011: narrow = half_sel;
      4'b0001: narrow = byte_sel;
      default: narrow = word;
    endcase
  end

  assign len5_rdata_o = is_dword(be_i) ? dword_data : {32'b0, narrow};
endmodule
