// tb_baud_gen: at the default 50 MHz / 19200 bit/s the tick period must be
// 2604 clocks; after a clear the count restarts at zero, so mid comes
// 1301 and the first tick 2603 clocks after the clear is released; checks the
// period over several bit times.
module tb_baud_gen;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0, clear = 0, tick, mid;
  baud_gen dut (.*);
  always #5 clk = ~clk;
  initial begin
    int cyc, last;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    cyc = 0; last = -1;
    for (int n = 0; n < 6; ) begin
      @(posedge clk); #1; cyc++;
      if (mid) `CHECK_EQ(cyc % 2604, 1301, "mid position")
      if (tick) begin
        if (last >= 0) `CHECK_EQ(cyc - last, 2604, "bit period")
        else `CHECK_EQ(cyc, 2603, "first tick after clear")
        last = cyc; n++;
      end
    end
    `TB_END
  end
  initial begin repeat (40000) @(posedge clk); failures++; `TB_END end
endmodule
