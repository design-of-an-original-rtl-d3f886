// tb_gpio_led: writes random patterns and checks the LED outputs and the
// read-back value.
module tb_gpio_led;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0, reg_re = 0, reg_we = 0;
  logic [11:0] reg_raddr = 0, reg_waddr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic [7:0] led;
  gpio_led dut (.*);
  always #5 clk = ~clk;
  `include "tb_regport.svh"
  initial begin
    logic [31:0] d, r;
    repeat (2) @(posedge clk);
    rst_n = 1;
    `CHECK_EQ(led, 8'h00, "reset off")
    for (int i = 0; i < 100; i++) begin
      d = $urandom;
      reg_write(12'h000, d);
      `CHECK_EQ(led, d[7:0], "led outputs")
      reg_read(12'h000, r);
      `CHECK_EQ(r, {24'd0, d[7:0]}, "read back")
    end
    `TB_END
  end
  initial begin repeat (5000) @(posedge clk); failures++; `TB_END end
endmodule
