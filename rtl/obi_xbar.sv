// obi_xbar: N-to-1 OBI crossbar in front of a single-port bus.
//
// The X-HEEP data bus has one 32-bit port, while the bridge offers four data
// ports (two for loads, two for stores). This crossbar forwards one request
// per cycle to the slave, chosen round robin among the masters whose req is
// high, and routes the slave grant back to that master only. Because the
// slave answers in request order, the index of every granted master is kept
// in a FIFO (OUTSTANDING entries) and the head of that FIFO receives the next
// rvalid, rdata and exception. New requests are held off while the FIFO is
// full. Arbitration and the FIFO are this design's choice; the document only
// says the crossbar sequences the four ports onto the single bus port.
// Timing: combinational request path, so a request granted by the slave in
// its first cycle also completes the master's address phase in that cycle.
module obi_xbar
  import bridge_pkg::*;
#(
  parameter int unsigned N_MASTERS   = 4,
  parameter int unsigned OUTSTANDING = 4
) (
  input  logic                     clk_i,
  input  logic                     rst_ni,
  input  obi_req_t [N_MASTERS-1:0] m_req_i,
  output obi_rsp_t [N_MASTERS-1:0] m_rsp_o,
  output obi_req_t                 s_req_o,
  input  obi_rsp_t                 s_rsp_i
);
  localparam int unsigned IDX_W = (N_MASTERS > 1) ? $clog2(N_MASTERS) : 1;

  logic [IDX_W-1:0] prio_q, sel;
  logic             any_req, fifo_full, fifo_empty;
  logic [IDX_W-1:0] resp_idx;

  // Round robin: first requesting master at or after prio_q
  always_comb begin
    sel     = prio_q;
    any_req = 1'b0;
    for (int unsigned k = 0; k < N_MASTERS; k++) begin
      int unsigned j;
      j = (int'(prio_q) + k) % N_MASTERS;
      if (!any_req && m_req_i[j].req) begin
        any_req = 1'b1;
        sel     = IDX_W'(j);
      end
    end
  end

  always_comb begin
    s_req_o     = m_req_i[sel];
    s_req_o.req = any_req && !fifo_full;
  end

  always_comb begin
    for (int unsigned i = 0; i < N_MASTERS; i++) begin
      m_rsp_o[i].gnt           = s_rsp_i.gnt && s_req_o.req && (sel == IDX_W'(i));
      m_rsp_o[i].rvalid        = s_rsp_i.rvalid && !fifo_empty && (resp_idx == IDX_W'(i));
      m_rsp_o[i].rdata         = s_rsp_i.rdata;
      m_rsp_o[i].except_raised = s_rsp_i.except_raised && (resp_idx == IDX_W'(i));
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) prio_q <= '0;
    else if (s_req_o.req && s_rsp_i.gnt)
      prio_q <= (sel == IDX_W'(N_MASTERS - 1)) ? '0 : sel + 1'b1;
  end

  bridge_fifo #(.DATA_W(IDX_W), .DEPTH(OUTSTANDING)) u_id_fifo (
    .clk_i, .rst_ni,
    .flush_i(1'b0),
    .push_i (s_req_o.req && s_rsp_i.gnt),
    .data_i (sel),
    .pop_i  (s_rsp_i.rvalid),
    .data_o (resp_idx),
    .empty_o(fifo_empty),
    .full_o (fifo_full)
  );

  a_rvalid_expected: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                      s_rsp_i.rvalid |-> !fifo_empty);
endmodule
