// tb_uart_receiver: drives 8N1 frames with a bit period 16 clocks (the
// divisor used here) into the receiver, reads them back through the DATA
// register, and checks order, data, status, the framing-error flag, that
// nothing is taken while EN is clear and the buffer-full interrupt after
// 256 bytes (plus overrun on the 257th).
module tb_uart_receiver;
  `include "tb_check.svh"
  localparam int DIV = 16;
  logic clk = 0, rst_n = 0, reg_re = 0, reg_we = 0, rxd = 1, irq_full;
  logic [11:0] reg_raddr = 0, reg_waddr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  int n_irq = 0;
  uart_receiver #(.DIVISOR(DIV), .DEPTH(256)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (irq_full) n_irq++;
  `include "tb_regport.svh"

  task automatic send(input logic [7:0] b, input logic stop = 1);
    rxd = 0; repeat (DIV) @(posedge clk);
    for (int k = 0; k < 8; k++) begin rxd = b[k]; repeat (DIV) @(posedge clk); end
    rxd = stop; repeat (DIV) @(posedge clk);
    rxd = 1; repeat (2) @(posedge clk);
  endtask

  initial begin
    logic [31:0] d; logic [7:0] exp_b [$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    send(8'h55);
    reg_read(12'h004, d);
    `CHECK_EQ(d[0], 1'b1, "nothing received while EN clear")
    reg_write(12'h008, 1);
    for (int i = 0; i < 20; i++) begin
      logic [7:0] b; b = 8'($urandom); exp_b.push_back(b); send(b);
    end
    for (int i = 0; i < 20; i++) begin
      reg_read(12'h000, d);
      `CHECK_EQ(d[8:0], {1'b0, exp_b.pop_front()}, "received byte")
    end
    reg_read(12'h000, d);
    `CHECK_EQ(d[8], 1'b1, "empty flag on DATA")
    // framing error: stop bit low
    send(8'hA5, 0);
    reg_read(12'h004, d);
    `CHECK_EQ(d[4], 1'b1, "framing error flag")
    `CHECK_EQ(d[0], 1'b1, "bad frame dropped")
    reg_write(12'h004, 0);
    // fill the buffer
    for (int i = 0; i < 256; i++) begin
      logic [7:0] b; b = 8'(i * 7); exp_b.push_back(b); send(b);
    end
    `CHECK_EQ(n_irq, 1, "buffer-full interrupt")
    reg_read(12'h004, d);
    `CHECK_EQ(d[1], 1'b1, "full flag")
    send(8'hEE);
    reg_read(12'h004, d);
    `CHECK_EQ(d[3], 1'b1, "overrun flag")
    for (int i = 0; i < 256; i++) begin
      reg_read(12'h000, d);
      `CHECK_EQ(d[7:0], exp_b.pop_front(), "buffered byte")
    end
    `TB_END
  end
  initial begin repeat (300 * 10 * DIV + 50000) @(posedge clk); failures++; `TB_END end
endmodule
