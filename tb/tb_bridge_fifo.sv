// tb_bridge_fifo: random push/pop/flush traffic against a queue model.
// Every cycle the head data, empty and full flags are compared with the
// model; pushes into a full FIFO and pops from an empty one are not
// issued, matching the FIFO's usage rule.
module tb_bridge_fifo;
  localparam int unsigned DW = 8, DEPTH = 4;
  logic clk = 0, rst_n = 0, flush = 0, push = 0, pop = 0;
  logic [DW-1:0] din = '0, dout;
  logic empty, full;
  int checks = 0, failures = 0;
  logic [DW-1:0] model[$];
  int n_full = 0, n_wrap = 0;

  bridge_fifo #(.DATA_W(DW), .DEPTH(DEPTH)) dut (
    .clk_i(clk), .rst_ni(rst_n), .flush_i(flush), .push_i(push), .data_i(din),
    .pop_i(pop), .data_o(dout), .empty_o(empty), .full_o(full));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      if (model.size() != 0) check(dout == model[0], "head data");
      if (full) n_full++;
      flush = ($urandom_range(0, 99) == 0);
      push  = ($urandom_range(0, 1) == 1) && (model.size() < DEPTH || pop);
      pop   = ($urandom_range(0, 1) == 1) && (model.size() != 0);
      if (model.size() == DEPTH && !pop) push = 0;
      din   = DW'($urandom);
      if (flush) model.delete();
      else begin
        if (pop) void'(model.pop_front());
        if (push) model.push_back(din);
      end
    end
    check(n_full > 0, "full state reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
