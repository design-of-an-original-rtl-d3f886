// tb_sun32_soc_full: the same end-to-end test with every SoC parameter at
// its default: 50 MHz clock, 19200 bit/s UART (2604 clocks per bit),
// 256-byte UART buffers and 16384-word memories (see soc_test_body.svh).
module tb_sun32_soc_full;
  `include "tb_check.svh"
  localparam int DIV = 50_000_000 / 19200;
  localparam int DEPTH = 256;
  logic clk = 0, rst_n = 0, uart_txd, uart_rxd;
  logic [7:0] led, sw;
  logic [7:3] ext_irq;
  sun32_soc dut (.*);
  always #5 clk = ~clk;
  `include "soc_test_body.svh"
  initial begin repeat (12_000_000) @(posedge clk); failures++; $display("FAIL watchdog"); `TB_END end
endmodule
