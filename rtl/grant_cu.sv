// grant_cu: address-phase control unit of the bridge LOAD and STORE modules.
//
// Mealy FSM with states ISSUE, WAIT_GNT0, WAIT_GNT1 (document Table 3.2).
// In ISSUE a DOUBLEWORD request (len5_be[7:4] all ones) is forwarded to both
// bus ports at once; LEN5 is granted only when both halves are granted
// (len5_gnt = gnt0 & gnt1), and the response FIFO is pushed on the first
// grant (len5_req & (gnt0 | gnt1)). If only one half is granted the FSM waits
// in WAIT_GNT0/WAIT_GNT1, keeping the other request up, and grants LEN5 when
// it is accepted. A 32-bit request (WORD, HALFWORD, BYTE) uses port 1 only
// and never leaves ISSUE. flush is a synchronous reset; reset state ISSUE.
module grant_cu
  import bridge_pkg::*;
(
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       flush_i,
  input  logic       len5_req_i,
  input  logic [7:0] len5_be_i,
  input  logic       bus_gnt0_i,
  input  logic       bus_gnt1_i,
  output logic       bus_req0_o,
  output logic       bus_req1_o,
  output logic       len5_gnt_o,
  output logic       push_fifo_o
);
  gnt_state_t state_q, state_d;
  logic       dword;

  assign dword = is_dword(len5_be_i);

  always_comb begin
    state_d     = state_q;
    bus_req0_o  = 1'b0;
    bus_req1_o  = 1'b0;
    len5_gnt_o  = 1'b0;
    push_fifo_o = 1'b0;
    unique case (state_q)
      GNT_ISSUE: begin
        if (dword) begin
          bus_req0_o  = len5_req_i;
          bus_req1_o  = len5_req_i;
          len5_gnt_o  = len5_req_i & bus_gnt0_i & bus_gnt1_i;
          push_fifo_o = len5_req_i & (bus_gnt0_i | bus_gnt1_i);
          if (len5_req_i) begin
            if (bus_gnt0_i && !bus_gnt1_i)      state_d = GNT_WAIT_GNT1;
            else if (!bus_gnt0_i && bus_gnt1_i) state_d = GNT_WAIT_GNT0;
          end
        end else begin
          bus_req1_o  = len5_req_i;
          len5_gnt_o  = len5_req_i & bus_gnt1_i;
          push_fifo_o = len5_req_i & bus_gnt1_i;
        end
      end
      GNT_WAIT_GNT0: begin
        bus_req0_o = 1'b1;
        len5_gnt_o = bus_gnt0_i;
        if (bus_gnt0_i) state_d = GNT_ISSUE;
      end
      GNT_WAIT_GNT1: begin
        bus_req1_o = 1'b1;
        len5_gnt_o = bus_gnt1_i;
        if (bus_gnt1_i) state_d = GNT_ISSUE;
      end
      default: state_d = GNT_ISSUE;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)      state_q <= GNT_ISSUE;
    else if (flush_i) state_q <= GNT_ISSUE;
    else              state_q <= state_d;
  end
endmodule
