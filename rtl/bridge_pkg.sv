// bridge_pkg: types and constants shared by the LEN5 <-> X-HEEP bridge.
//
// LEN5 is a 64-bit core; the X-HEEP bus is 32 bits wide. LEN5 encodes the
// size of a data request in an 8-bit byte enable with only four legal values
// (DOUBLEWORD, WORD, HALFWORD, BYTE); the low address bits give the lane.
// A request is a DOUBLEWORD when the upper nibble of the byte enable is set,
// which is the only test the bridge needs to choose between one and two bus
// transactions. The state encodings of the bridge control units and the
// exception code reported for instruction faults also live here. The codes
// follow the document; the numeric value of E_I_ACCESS_FAULT is the RISC-V
// cause number for an instruction access fault.
package bridge_pkg;

  localparam int unsigned LEN5_XLEN = 64;  // LEN5 address and data width
  localparam int unsigned BUS_W     = 32;  // X-HEEP address and data width
  localparam int unsigned EXC_W     = 8;   // width of an exception code

  // Byte-enable codes generated by LEN5
  localparam logic [7:0] BE_DWORD = 8'hFF;
  localparam logic [7:0] BE_WORD  = 8'h0F;
  localparam logic [7:0] BE_HALF  = 8'h03;
  localparam logic [7:0] BE_BYTE  = 8'h01;

  // Exception code forced on the instruction interface
  localparam logic [EXC_W-1:0] E_I_ACCESS_FAULT = 8'd1;

  typedef enum logic {
    INSTR_IDLE,
    INSTR_BUFFER
  } instr_state_t;

  typedef enum logic [1:0] {
    GNT_ISSUE,
    GNT_WAIT_GNT0,
    GNT_WAIT_GNT1
  } gnt_state_t;

  typedef enum logic [2:0] {
    RV_IDLE,
    RV_WAIT_RVALID0,
    RV_WAIT_RVALID1,
    RV_WAIT_RVALID0_ERR,
    RV_WAIT_RVALID1_ERR
  } rvalid_state_t;

  // One 32-bit OBI port of the X-HEEP bus, master to slave and back
  typedef struct packed {
    logic             req;
    logic [BUS_W-1:0] addr;
    logic             we;
    logic [3:0]       be;
    logic [31:0]      wdata;
  } obi_req_t;

  typedef struct packed {
    logic        gnt;
    logic        rvalid;
    logic [31:0] rdata;
    logic        except_raised;
  } obi_rsp_t;

  // A request is 64 bits wide when the upper nibble of its byte enable is set
  function automatic logic is_dword(input logic [7:0] be);
    return &be[7:4];
  endfunction

endpackage
