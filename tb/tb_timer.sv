// tb_timer: programs TMCMP, enables the timer and checks that the
// interrupt comes every TMCMP + 1 clocks, that TMCNT counts while EN is
// set and holds while it is clear, and that TMCNT can be written.
module tb_timer;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0, reg_re = 0, reg_we = 0, irq;
  logic [11:0] reg_raddr = 0, reg_waddr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  timer dut (.*);
  always #5 clk = ~clk;
  `include "tb_regport.svh"
  initial begin
    logic [31:0] d, d2; int last, cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 5; r++) begin
      int cmp; cmp = 5 + $urandom % 200;
      reg_write(12'h008, 0);
      reg_write(12'h000, 0);
      reg_write(12'h004, cmp);
      reg_write(12'h008, 1);
      last = -1; cyc = 0;
      for (int n = 0; n < 4; ) begin
        @(posedge clk); #1; cyc++;
        if (irq) begin
          if (last >= 0) `CHECK_EQ(cyc - last, cmp + 1, "timer period")
          last = cyc; n++;
        end
      end
    end
    reg_read(12'h000, d);
    reg_read(12'h000, d2);
    `CHECK_EQ(d2 != d, 1'b1, "TMCNT counts while enabled")
    reg_write(12'h008, 0);
    reg_read(12'h000, d);
    repeat (10) @(posedge clk);
    reg_read(12'h000, d2);
    `CHECK_EQ(d2, d, "TMCNT holds while disabled")
    reg_write(12'h000, 32'h1234);
    reg_read(12'h000, d);
    `CHECK_EQ(d, 32'h1234, "TMCNT written")
    `TB_END
  end
  initial begin repeat (20000) @(posedge clk); failures++; `TB_END end
endmodule
