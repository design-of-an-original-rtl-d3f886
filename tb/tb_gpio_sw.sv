// tb_gpio_sw: sets random switch patterns and reads them back after the
// two-flop synchroniser.
module tb_gpio_sw;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0, reg_re = 0, reg_we = 0;
  logic [11:0] reg_raddr = 0, reg_waddr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic [7:0] sw = 0;
  gpio_sw dut (.*);
  always #5 clk = ~clk;
  `include "tb_regport.svh"
  initial begin
    logic [31:0] r;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      sw = 8'($urandom);
      repeat (3) @(posedge clk);
      reg_read(12'h000, r);
      `CHECK_EQ(r, {24'd0, sw}, "switches")
    end
    `TB_END
  end
  initial begin repeat (5000) @(posedge clk); failures++; `TB_END end
endmodule
