// tb_div32: signed and unsigned division and remainder on random and
// corner operands, including division by zero, and the 34-cycle latency.
module tb_div32;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0, start = 0, is_signed = 0, busy, done;
  logic [31:0] dividend, divisor, quotient, remainder;
  div32 dut (.*);
  always #5 clk = ~clk;
  initial begin
    logic [31:0] eq, er;
    int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      dividend  = (i % 9 == 0) ? 32'h8000_0000 : $urandom;
      divisor   = (i % 13 == 0) ? 32'd0 : (i % 4 == 0) ? ($urandom & 32'hFF) : $urandom;
      if (i % 17 == 0) divisor = 32'hFFFF_FFFF;
      is_signed = i[0];
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      if (divisor == 0) begin
        eq = '1; er = dividend;
      end else if (is_signed) begin
        eq = $signed(dividend) / $signed(divisor);
        er = $signed(dividend) % $signed(divisor);
        if (dividend == 32'h8000_0000 && divisor == '1) begin eq = 32'h8000_0000; er = 0; end
      end else begin
        eq = dividend / divisor; er = dividend % divisor;
      end
      `CHECK_EQ(quotient, eq, "quotient")
      `CHECK_EQ(remainder, er, "remainder")
      `CHECK_EQ(cyc, 34, "latency")
    end
    `TB_END
  end
  initial begin repeat (20000) @(posedge clk); failures++; `TB_END end
endmodule
