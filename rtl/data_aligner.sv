// data_aligner: STORE data and byte enables for the two bus ports.
//
// Combinational. DOUBLEWORD: port 0 gets wdata[31:0] with be[3:0], port 1
// gets wdata[63:32] with be[7:4]. 32-bit stores use port 1 only and work on
// wdata[31:0]: a WORD goes out unchanged with be[3:0]; a HALFWORD is
// replicated twice over the word and bus_be1 selects 1100 (addr[1] = 1) or
// 0011; a BYTE is replicated four times and bus_be1 is a one-hot lane picked
// by addr[1:0]. Replication plus byte enables replaces a barrel shifter, as
// the document proposes. bus_be0 is always be[3:0]; bus_wdata0 carries the
// low word in every case.
module data_aligner
  import bridge_pkg::*;
(
  input  logic [LEN5_XLEN-1:0] len5_wdata_i,
  input  logic [7:0]           len5_be_i,
  input  logic [1:0]           addr_lsb_i,
  output logic [31:0]          bus_wdata0_o,
  output logic [31:0]          bus_wdata1_o,
  output logic [3:0]           bus_be0_o,
  output logic [3:0]           bus_be1_o
);
  assign bus_wdata0_o = len5_wdata_i[31:0];
  assign bus_be0_o    = len5_be_i[3:0];

  always_comb begin
    if (is_dword(len5_be_i)) begin
      bus_wdata1_o = len5_wdata_i[63:32];
      bus_be1_o    = len5_be_i[7:4];
    end else begin
      unique case (len5_be_i[3:0])
        4'b0011: begin
          bus_wdata1_o = {2{len5_wdata_i[15:0]}};
          bus_be1_o    = addr_lsb_i[1] ? 4'b1100 : 4'b0011;
        end
        4'b0001: begin
          bus_wdata1_o = {4{len5_wdata_i[7:0]}};
          bus_be1_o    = 4'b0001 << addr_lsb_i;
        end
        default: begin
          bus_wdata1_o = len5_wdata_i[31:0];
          bus_be1_o    = len5_be_i[3:0];
        end
      endcase
    end
  end
endmodule
