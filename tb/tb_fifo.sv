// tb_fifo: random push/pop traffic against a queue model at the full
// 256-entry depth; checks head data, count, empty and full, and that
// pushes to a full buffer and pops from an empty one are ignored.
module tb_fifo;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0, push = 0, pop = 0, empty, full;
  logic [7:0] wdata = 0, rdata;
  logic [8:0] count;
  logic [7:0] q [$];
  int n_full = 0, n_empty_pop = 0;
  fifo #(.WIDTH(8), .DEPTH(256)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      int bias;
      bias = (i / 1000) % 2 ? 30 : 70;   // alternate filling and draining phases
      @(negedge clk);
      push = ($urandom % 100) < bias; pop = ($urandom % 100) < (100 - bias);
      wdata = 8'($urandom);
      #1;
      `CHECK_EQ(count, 9'(q.size()), "count")
      `CHECK_EQ(empty, q.size() == 0, "empty")
      `CHECK_EQ(full, q.size() == 256, "full")
      if (q.size() != 0) `CHECK_EQ(rdata, q[0], "head")
      if (full && push) n_full++;
      if (empty && pop) n_empty_pop++;
      @(posedge clk);
      if (pop && q.size() != 0) void'(q.pop_front());
      if (push && q.size() < 256 && !(full)) q.push_back(wdata);
    end
    checks++; if (n_full == 0) begin failures++; $display("FAIL never full"); end
    checks++; if (n_empty_pop == 0) begin failures++; $display("FAIL never empty pop"); end
    `TB_END
  end
  initial begin repeat (20000) @(posedge clk); failures++; `TB_END end
endmodule
