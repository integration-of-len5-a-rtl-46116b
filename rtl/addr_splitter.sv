// addr_splitter: bus addresses for the two ports of the LOAD/STORE modules.
//
// Purely combinational. For a 32-bit request both ports carry addr[31:0]
// (only port 1 is actually requested). For a DOUBLEWORD, port 0 carries the
// low word at addr[31:0] and port 1 the high word four bytes above it: when
// addr[2] is 0 (treated as aligned) this is addr with bit 2 forced to 1,
// otherwise (misaligned) an adder computes addr + 4. Behaviour as in the
// document; the adder is the bridge's critical path there.
module addr_splitter
  import bridge_pkg::*;
(
  input  logic [LEN5_XLEN-1:0] len5_addr_i,
  input  logic [7:0]           len5_be_i,
  output logic [BUS_W-1:0]     bus_addr0_o,
  output logic [BUS_W-1:0]     bus_addr1_o
);
  logic [BUS_W-1:0] addr;

  assign addr        = len5_addr_i[BUS_W-1:0];
  assign bus_addr0_o = addr;

  always_comb begin
    if (!is_dword(len5_be_i))  bus_addr1_o = addr;
    else if (!addr[2])         bus_addr1_o = {addr[BUS_W-1:3], 1'b1, addr[1:0]};
    else                       bus_addr1_o = addr + BUS_W'(4);
  end
endmodule
