// instr_cu: control unit of the bridge Instruction Module.
//
// A two-state Mealy FSM (IDLE, BUFFER). In IDLE the bus response goes straight
// to LEN5 (len5_rvalid = bus_rvalid, buff_sel = 0) and the instruction buffer
// is written whenever LEN5 is not ready (buff_en = ~len5_rready), so the
// instruction is caught in the same cycle LEN5 refuses it. If a response
// arrives while LEN5 is not ready the FSM moves to BUFFER, where it presents
// the buffered instruction (buff_sel = 1, len5_rvalid = 1, buff_en = 0) until
// LEN5 raises rready again. Independently of the state, bus_req and len5_gnt
// are the request and grant gated by len5_rready, so no new fetch is started
// while LEN5 cannot take its answer. flush returns the FSM to IDLE.
// All of this is the document's Table 3.1; the reset state is IDLE.
module instr_cu
  import bridge_pkg::*;
(
  input  logic clk_i,
  input  logic rst_ni,
  input  logic flush_i,
  input  logic len5_req_i,
  input  logic len5_rready_i,
  input  logic bus_gnt_i,
  input  logic bus_rvalid_i,
  output logic bus_req_o,
  output logic len5_gnt_o,
  output logic len5_rvalid_o,
  output logic buff_en_o,
  output logic buff_sel_o
);
  instr_state_t state_q, state_d;

  assign bus_req_o  = len5_req_i & len5_rready_i;
  assign len5_gnt_o = bus_gnt_i & len5_rready_i;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      INSTR_IDLE:   if (!len5_rready_i && bus_rvalid_i) state_d = INSTR_BUFFER;
      INSTR_BUFFER: if (len5_rready_i) state_d = INSTR_IDLE;
      default:      state_d = INSTR_IDLE;
    endcase
  end

  always_comb begin
    unique case (state_q)
      INSTR_BUFFER: begin
        len5_rvalid_o = 1'b1;
        buff_sel_o    = 1'b1;
        buff_en_o     = 1'b0;
      end
      default: begin
        len5_rvalid_o = bus_rvalid_i;
        buff_sel_o    = 1'b0;
        buff_en_o     = ~len5_rready_i;
      end
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)      state_q <= INSTR_IDLE;
    else if (flush_i) state_q <= INSTR_IDLE;
    else              state_q <= state_d;
  end
endmodule
