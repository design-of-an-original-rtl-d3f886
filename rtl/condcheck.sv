// condcheck: branch-condition evaluation.
//
// Given the branch condition of a branch instruction and the condition
// code held in the control status register (Z, LT, ULT, set by cmp),
// says whether the branch is taken: b always; beq Z; bne !Z; bgt !Z & !LT;
// ble Z | LT; bult ULT; bule ULT | Z; bugt !ULT & !Z; buge !ULT. The
// branch mnemonics follow the document; the flag set is this design's.
// Combinational.
module condcheck
  import sun32_pkg::*;
(
  input  br_cond_e cond,
  input  cc_t      cc,
  output logic     taken
);
  logic z, lt, ult;
  assign z   = cc[CC_Z];
  assign lt  = cc[CC_LT];
  assign ult = cc[CC_ULT];

  always_comb begin
    unique case (cond)
      BR_ALWAYS: taken = 1'b1;
      BR_EQ:     taken = z;
      BR_NE:     taken = !z;
      BR_GT:     taken = !z && !lt;
      BR_LE:     taken = z || lt;
      BR_ULT:    taken = ult;
      BR_ULE:    taken = ult || z;
      BR_UGT:    taken = !ult && !z;
      BR_UGE:    taken = !ult;
      default:   taken = 1'b0;
    endcase
  end
endmodule
