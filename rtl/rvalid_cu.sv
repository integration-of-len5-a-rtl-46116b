// rvalid_cu: response-phase control unit of the bridge LOAD and STORE modules.
//
// Mealy FSM with states IDLE, WAIT_RVALID0, WAIT_RVALID1, WAIT_RVALID0_ERR and
// WAIT_RVALID1_ERR (document Tables 3.3 and 3.4). The request size comes from
// the byte enable stored in the response FIFO, since LEN5 has moved on.
// IDLE, DOUBLEWORD: len5_rvalid = rvalid0 & rvalid1; when only one half
// arrives, reg_en = rvalid0 ^ rvalid1 stores it in the data buffer through
// the mux reg_ctr_mux (= rvalid1, 1 selects port 1), and the FSM waits for
// the other half in WAIT_RVALIDx, or WAIT_RVALIDx_ERR if the first half
// carried an exception. exit1_ctr_mux = 1 routes both ports straight out.
// len5_except = except0 | except1.
// IDLE, 32-bit: everything follows port 1.
// WAIT_RVALID0: port 1 is buffered, output {buffer, data0} (exit0 = 0),
// rvalid and exception from port 0. WAIT_RVALID1: port 0 is buffered, output
// {data1, buffer} (exit0 = 1), rvalid and exception from port 1. The _ERR
// states are the same but hold len5_except at 1. flush is a synchronous
// reset; the reset state is IDLE.
module rvalid_cu
  import bridge_pkg::*;
(
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       flush_i,
  input  logic [7:0] fifo_be_i,
  input  logic       bus_rvalid0_i,
  input  logic       bus_rvalid1_i,
  input  logic       bus_except0_i,
  input  logic       bus_except1_i,
  output logic       len5_rvalid_o,
  output logic       reg_en_o,
  output logic       reg_ctr_mux_o,
  output logic       exit0_ctr_mux_o,
  output logic       exit1_ctr_mux_o,
  output logic       len5_except_o
);
  rvalid_state_t state_q, state_d;

  always_comb begin
    state_d         = state_q;
    len5_rvalid_o   = 1'b0;
    reg_en_o        = 1'b0;
    reg_ctr_mux_o   = 1'b0;
    exit0_ctr_mux_o = 1'b0;
    exit1_ctr_mux_o = 1'b0;
    len5_except_o   = 1'b0;
    unique case (state_q)
      RV_IDLE: begin
        if (is_dword(fifo_be_i)) begin
          len5_rvalid_o   = bus_rvalid0_i & bus_rvalid1_i;
          reg_en_o        = bus_rvalid0_i ^ bus_rvalid1_i;
          reg_ctr_mux_o   = bus_rvalid1_i;
          exit1_ctr_mux_o = 1'b1;
          len5_except_o   = bus_except0_i | bus_except1_i;
          if (bus_rvalid0_i && !bus_rvalid1_i)
            state_d = bus_except0_i ? RV_WAIT_RVALID1_ERR : RV_WAIT_RVALID1;
          else if (!bus_rvalid0_i && bus_rvalid1_i)
            state_d = bus_except1_i ? RV_WAIT_RVALID0_ERR : RV_WAIT_RVALID0;
        end else begin
          len5_rvalid_o = bus_rvalid1_i;
          len5_except_o = bus_except1_i;
        end
      end
      RV_WAIT_RVALID0, RV_WAIT_RVALID0_ERR: begin
        len5_rvalid_o = bus_rvalid0_i;
        len5_except_o = (state_q == RV_WAIT_RVALID0_ERR) | bus_except0_i;
        if (bus_rvalid0_i) state_d = RV_IDLE;
      end
      RV_WAIT_RVALID1, RV_WAIT_RVALID1_ERR: begin
        len5_rvalid_o   = bus_rvalid1_i;
        exit0_ctr_mux_o = 1'b1;
        len5_except_o   = (state_q == RV_WAIT_RVALID1_ERR) | bus_except1_i;
        if (bus_rvalid1_i) state_d = RV_IDLE;
      end
      default: state_d = RV_IDLE;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)      state_q <= RV_IDLE;
    else if (flush_i) state_q <= RV_IDLE;
    else              state_q <= state_d;
  end
endmodule
