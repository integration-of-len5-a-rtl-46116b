// bridge_fifo: circular FIFO used for the tag and response queues of the bridge.
//
// Each entry carries a valid bit. Two modulo-DEPTH counters point at the head
// (oldest entry, read combinationally on data_o) and at the tail (next free
// slot). When the counters are equal the valid bit at the head tells a full
// queue (1) from an empty one (0). push_i writes data_i at the tail on the
// rising clock edge, pop_i drops the head entry; both may happen in the same
// cycle. A push into a full queue or a pop from an empty one is ignored and
// flagged by an assertion. flush_i empties the queue synchronously.
// The structure follows the document; DEPTH is this design's choice.
module bridge_fifo #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned DEPTH  = 4
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              flush_i,
  input  logic              push_i,
  input  logic [DATA_W-1:0] data_i,
  input  logic              pop_i,
  output logic [DATA_W-1:0] data_o,
  output logic              empty_o,
  output logic              full_o
);
  localparam int unsigned CNT_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DATA_W-1:0] mem_q [DEPTH];
  logic [DEPTH-1:0]  valid_q;
  logic [CNT_W-1:0]  head_cnt, tail_cnt;
  logic              do_push, do_pop;

  assign empty_o = (head_cnt == tail_cnt) && !valid_q[head_cnt];
  assign full_o  = (head_cnt == tail_cnt) &&  valid_q[head_cnt];
  assign do_push = push_i && !full_o;
  assign do_pop  = pop_i && !empty_o;
  assign data_o  = mem_q[head_cnt];

  function automatic logic [CNT_W-1:0] incr(input logic [CNT_W-1:0] c);
    return (c == CNT_W'(DEPTH - 1)) ? '0 : c + 1'b1;
  endfunction

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      head_cnt <= '0;
      tail_cnt <= '0;
      valid_q  <= '0;
    end else if (flush_i) begin
      head_cnt <= '0;
      tail_cnt <= '0;
      valid_q  <= '0;
    end else begin
      if (do_pop) begin
        valid_q[head_cnt] <= 1'b0;
        head_cnt          <= incr(head_cnt);
      end
      if (do_push) begin
        valid_q[tail_cnt] <= 1'b1;
        tail_cnt          <= incr(tail_cnt);
      end
    end
  end

  always_ff @(posedge clk_i) begin
    if (do_push) mem_q[tail_cnt] <= data_i;
  end

  a_no_overflow:  assert property (@(posedge clk_i) disable iff (!rst_ni || flush_i) push_i |-> !full_o);
  a_no_underflow: assert property (@(posedge clk_i) disable iff (!rst_ni || flush_i) pop_i |-> !empty_o);
endmodule
