// tb_uart_sender: writes bytes into the sender (with the small divisor 16
// to keep the run short), decodes the serial line with an independent
// receiver model and compares the bytes; checks that nothing is sent while
// EN is clear, the bit period, the buffer-empty interrupt and the status.
module tb_uart_sender;
  `include "tb_check.svh"
  localparam int DIV = 16;
  logic clk = 0, rst_n = 0, reg_re = 0, reg_we = 0, txd, irq_empty;
  logic [11:0] reg_raddr = 0, reg_waddr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic [7:0] sent [$];
  int n_irq = 0, n_rx = 0;
  uart_sender #(.DIVISOR(DIV), .DEPTH(256)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (irq_empty) n_irq++;
  `include "tb_regport.svh"

  // line decoder: waits for a start bit, samples each bit in its middle
  initial begin
    forever begin
      logic [7:0] b; int t0;
      @(negedge txd);
      t0 = $time;
      repeat (DIV / 2) @(posedge clk);
      `CHECK_EQ(txd, 1'b0, "start bit")
      for (int k = 0; k < 8; k++) begin repeat (DIV) @(posedge clk); b[k] = txd; end
      repeat (DIV) @(posedge clk);
      `CHECK_EQ(txd, 1'b1, "stop bit")
      if (sent.size() != 0) begin `CHECK_EQ(b, sent.pop_front(), "byte on the line") end
      else begin failures++; $display("FAIL unexpected byte"); end
      n_rx++;
    end
  end

  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // bytes written while disabled stay in the buffer
    for (int i = 0; i < 5; i++) begin d = $urandom; reg_write(12'h000, d); sent.push_back(d[7:0]); end
    repeat (200) @(posedge clk);
    `CHECK_EQ(txd, 1'b1, "idle while EN clear")
    reg_read(12'h004, d);
    `CHECK_EQ(d[16:8], 9'd5, "count")
    reg_write(12'h008, 1);
    for (int i = 0; i < 30; i++) begin
      d = $urandom; reg_write(12'h000, d); sent.push_back(d[7:0]);
    end
    wait (sent.size() == 0);
    repeat (3 * DIV) @(posedge clk);
    reg_read(12'h004, d);
    `CHECK_EQ(d[0], 1'b1, "empty after sending")
    `CHECK_EQ(n_rx, 35, "bytes received")
    checks++; if (n_irq != 1) begin failures++; $display("FAIL irq_empty count %0d", n_irq); end
    `TB_END
  end
  initial begin repeat (40 * 10 * DIV + 2000) @(posedge clk); failures++; `TB_END end
endmodule
