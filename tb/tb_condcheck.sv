// tb_condcheck: every branch condition against every flag combination,
// with flags produced from real signed/unsigned comparisons.
module tb_condcheck;
  import sun32_pkg::*;
  `include "tb_check.svh"
  br_cond_e cond;
  cc_t      cc;
  logic     taken;
  condcheck dut (.cond, .cc, .taken);
  initial begin
    logic [31:0] a, b;
    logic exp_t;
    for (int i = 0; i < 2000; i++) begin
      a = $urandom & 32'h8000_000F; b = (i % 3 == 0) ? a : $urandom & 32'h8000_000F;
      cc[CC_Z] = a == b; cc[CC_LT] = $signed(a) < $signed(b); cc[CC_ULT] = a < b;
      cond = br_cond_e'(i % 9);
      #1;
      unique case (cond)
        BR_ALWAYS: exp_t = 1;
        BR_EQ:  exp_t = a == b;
        BR_NE:  exp_t = a != b;
        BR_GT:  exp_t = $signed(a) > $signed(b);
        BR_LE:  exp_t = $signed(a) <= $signed(b);
        BR_ULT: exp_t = a < b;
        BR_ULE: exp_t = a <= b;
        BR_UGT: exp_t = a > b;
        default: exp_t = a >= b;
      endcase
      `CHECK_EQ(taken, exp_t, "branch taken")
    end
    `TB_END
  end
  initial begin #100000; failures++; `TB_END end
endmodule
