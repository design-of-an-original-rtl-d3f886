// tb_sun32_soc: end-to-end test of the SoC with a 16-clock UART bit time
// and 16-entry UART buffers to keep the run short (see soc_test_body.svh).
module tb_sun32_soc;
  `include "tb_check.svh"
  localparam int DIV = 16;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0, uart_txd, uart_rxd;
  logic [7:0] led, sw;
  logic [7:3] ext_irq;
  sun32_soc #(.UART_DIV(DIV), .UART_DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  `include "soc_test_body.svh"
  initial begin repeat (400000) @(posedge clk); failures++; $display("FAIL watchdog"); `TB_END end
endmodule
