// tb_inc32: checks pc + 4 for word-aligned addresses, including wrap.
module tb_inc32;
  `include "tb_check.svh"
  logic [31:0] a, y;
  inc32 dut (.a, .y);
  initial begin
    for (int i = 0; i < 500; i++) begin
      a = (i == 0) ? 32'hFFFF_FFFC : (i == 1) ? 32'h0000_FFFC : {$urandom} & ~32'h3;
      #1;
      `CHECK_EQ(y, a + 32'd4, "inc32")
    end
    `TB_END
  end
  initial begin #100000; failures++; `TB_END end
endmodule
