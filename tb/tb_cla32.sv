// tb_cla32: compares the carry look-ahead adder with the + operator on
// corner cases and random operands.
module tb_cla32;
  `include "tb_check.svh"
  logic [31:0] a, b, sum;
  logic        cin, cout;
  cla32 dut (.a, .b, .cin, .sum, .cout);
  initial begin
    logic [32:0] ref_v;
    for (int i = 0; i < 2000; i++) begin
      if (i < 4) begin a = (i & 1) ? '1 : 32'h8000_0000; b = (i & 2) ? 32'h1 : '1; end
      else begin a = $urandom; b = $urandom; end
      cin = i[0];
      #1;
      ref_v = {1'b0, a} + {1'b0, b} + 33'(cin);
      `CHECK_EQ({cout, sum}, ref_v, "cla32 sum")
    end
    `TB_END
  end
  initial begin #100000; failures++; `TB_END end
endmodule
