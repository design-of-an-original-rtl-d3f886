// tb_reg32: writes random values to random registers, checks both read
// ports against a reference array and that r0 stays zero.
module tb_reg32;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic [31:0] model [32];
  reg32 dut (.*);
  always #5 clk = ~clk;
  initial begin
    for (int i = 0; i < 32; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = 1; wa = (i < 32) ? 5'(i) : 5'($urandom); wd = $urandom;
      @(posedge clk); #1;
      if (wa != 0) model[wa] = wd;
      we = 0;
      ra1 = 5'($urandom); ra2 = (i % 8 == 0) ? 5'd0 : 5'($urandom);
      #1;
      `CHECK_EQ(rd1, model[ra1], "read port 1")
      `CHECK_EQ(rd2, model[ra2], "read port 2")
    end
    `TB_END
  end
  initial begin repeat (5000) @(posedge clk); failures++; `TB_END end
endmodule
