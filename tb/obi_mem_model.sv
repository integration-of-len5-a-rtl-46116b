// obi_mem_model: behavioural OBI memory slave for testbenches.
// Grants a request on a random subset of cycles (GNT_PCT percent), performs
// the access at the grant (writes honour the byte enables), and returns the
// response in order after a random delay of 1..MAX_LAT cycles. Words that
// were never written read as tb_mem_pkg::init_word(address); addresses for
// which tb_mem_pkg::is_err_addr holds are not written and respond with
// except_raised set. Counters report grants and error responses.
module obi_mem_model
  import bridge_pkg::*;
  import tb_mem_pkg::*;
#(
  parameter int unsigned GNT_PCT = 60,
  parameter int unsigned MAX_LAT = 4
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  input  obi_req_t req_i,
  output obi_rsp_t rsp_o
);
  typedef struct {
    logic [31:0] rdata;
    logic        err;
    longint      due;
  } pend_t;

  logic [31:0] mem [logic [29:0]];
  pend_t       pend[$];
  longint      cycle = 0;
  logic        gnt_en = 1'b0;
  logic        rvalid_q = 1'b0, err_q = 1'b0;
  logic [31:0] rdata_q = '0;
  int          n_grants = 0, n_errors = 0;

  function automatic logic [31:0] read_word(input logic [31:0] a);
    return mem.exists(a[31:2]) ? mem[a[31:2]] : init_word(a);
  endfunction

  assign rsp_o.gnt           = req_i.req & gnt_en;
  assign rsp_o.rvalid        = rvalid_q;
  assign rsp_o.rdata         = rdata_q;
  assign rsp_o.except_raised = err_q;

  always @(posedge clk_i) begin
    pend_t p, n;
    logic [31:0] w;
    cycle++;
    rvalid_q <= 1'b0;
    err_q    <= 1'b0;
    if (!rst_ni) begin
      pend.delete();
      gnt_en <= 1'b0;
    end else begin
      if (pend.size() != 0 && pend[0].due <= cycle && $urandom_range(0, 3) != 0) begin
        p = pend.pop_front();
        rvalid_q <= 1'b1;
        rdata_q  <= p.rdata;
        err_q    <= p.err;
        if (p.err) n_errors++;
      end
      if (rsp_o.gnt) begin
        n_grants++;
        n.err = is_err_addr(req_i.addr);
        w = read_word(req_i.addr);
        if (req_i.we && !n.err) begin
          for (int b = 0; b < 4; b++)
            if (req_i.be[b]) w[b*8 +: 8] = req_i.wdata[b*8 +: 8];
          mem[req_i.addr[31:2]] = w;
        end
        n.rdata = w;
        n.due   = cycle + longint'($urandom_range(1, MAX_LAT));
        if (pend.size() != 0 && n.due < pend[pend.size()-1].due) n.due = pend[pend.size()-1].due;
        pend.push_back(n);
      end
      gnt_en <= ($urandom_range(0, 99) < GNT_PCT);
    end
  end
endmodule
