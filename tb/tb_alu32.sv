// tb_alu32: checks every ALU function and the compare flags against
// reference expressions on random and corner-case operands.
module tb_alu32;
  import sun32_pkg::*;
  `include "tb_check.svh"
  alu_fn_e     fn;
  logic [31:0] a, b, y;
  cc_t         cc;
  alu32 dut (.fn, .a, .b, .y, .cc);
  initial begin
    logic [31:0] exp_y;
    for (int i = 0; i < 3000; i++) begin
      a  = (i % 7 == 0) ? 32'h8000_0000 : $urandom;
      b  = (i % 5 == 0) ? a : (i % 11 == 0) ? 32'h7FFF_FFFF : $urandom;
      fn = alu_fn_e'(i % 16);
      #1;
      unique case (fn)
        ALU_ADD:            exp_y = a + b;
        ALU_SUB, ALU_CMP:   exp_y = a - b;
        ALU_MULT, ALU_MULTU: exp_y = a * b;
        ALU_SLL:            exp_y = a << b[4:0];
        ALU_SRL:            exp_y = a >> b[4:0];
        ALU_SRA:            exp_y = $signed(a) >>> b[4:0];
        ALU_AND:            exp_y = a & b;
        ALU_OR:             exp_y = a | b;
        ALU_XOR:            exp_y = a ^ b;
        default:            exp_y = b;
      endcase
      `CHECK_EQ(y, exp_y, "alu result")
      if (fn == ALU_CMP) begin
        `CHECK_EQ(cc[CC_Z], a == b, "cmp Z")
        `CHECK_EQ(cc[CC_LT], $signed(a) < $signed(b), "cmp LT")
        `CHECK_EQ(cc[CC_ULT], a < b, "cmp ULT")
      end
    end
    `TB_END
  end
  initial begin #100000; failures++; `TB_END end
endmodule
