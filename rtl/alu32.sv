// alu32: arithmetic and logic unit of the sun32 core.
//
// Performs the arithmetic (add, sub, mult, multu), shift (sll, srl, sra)
// and logical (and, or, xor) instructions, and compare (cmp), which
// subtracts b from a and returns the three condition-code bits: Z (equal),
// LT (signed less than) and ULT (unsigned less than). Add, subtract and
// compare use the cla32 carry look-ahead adder. mult and multu return the
// low 32 bits of the product (identical for both). Shift amounts are
// b[4:0]. Division is not done here but in div32. The instruction list
// follows the document; the flag set, the product width and the shift
// amount field are this design's choices. Combinational.
module alu32
  import sun32_pkg::*;
(
  input  alu_fn_e     fn,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output cc_t         cc
);
  logic [31:0] b_add, sum;
  logic        cin, cout;
  logic        sub;

  assign sub   = (fn == ALU_SUB) || (fn == ALU_CMP);
  assign b_add = sub ? ~b : b;
  assign cin   = sub;

  cla32 u_cla (.a(a), .b(b_add), .cin(cin), .sum(sum), .cout(cout));

  // compare flags from a - b
  always_comb begin
    cc         = '0;
    cc[CC_Z]   = (sum == 32'd0);
    cc[CC_ULT] = ~cout;                               // borrow
    cc[CC_LT]  = sum[31] ^ ((a[31] ^ b[31]) & (a[31] ^ sum[31]));  // N xor V
  end

  always_comb begin
    unique case (fn)
      ALU_ADD, ALU_SUB, ALU_CMP: y = sum;
      ALU_MULT, ALU_MULTU:       y = a * b;
      ALU_SLL:                   y = a << b[4:0];
      ALU_SRL:                   y = a >> b[4:0];
      ALU_SRA:                   y = 32'($signed(a) >>> b[4:0]);
      ALU_AND:                   y = a & b;
      ALU_OR:                    y = a | b;
      ALU_XOR:                   y = a ^ b;
      default:                   y = b;                // ALU_PASSB and div codes
    endcase
  end
endmodule
