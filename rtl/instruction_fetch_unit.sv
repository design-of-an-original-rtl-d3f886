// instruction_fetch_unit: program counter, instruction register and
// next-PC selection of the sun32 core.
//
// Holds the PC and the instruction register (IR). The next PC is chosen by
// pc_sel: hold, the sequential address pc + 4 (from inc32), the
// PC-relative target pc + off25 * 4 (off25 = IR[24:0], signed, counted
// from the address of the branch itself), or an absolute target (r31 for
// ret, the saved EPC for reti, a vector-table entry for an interrupt).
// The PC resets to RESET_PC. The document says the fetch stage is where
// the core checks for an interrupt and that branch offsets are 25-bit
// PC-relative; the word scaling of the offset, the offset origin and the
// reset address are this design's choices. PC and IR change on the rising
// clock edge; the targets are combinational.
module instruction_fetch_unit
  import sun32_pkg::*;
#(
  parameter logic [31:0] RESET_ADDR = RESET_PC
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  pc_sel,      // 0 hold, 1 pc+4, 2 pc-relative, 3 absolute
  input  logic [31:0] abs_target,
  input  logic        ir_we,
  input  logic [31:0] ir_in,
  output logic [31:0] pc,
  output logic [31:0] pc_plus4,
  output logic [31:0] rel_target,
  output logic [31:0] ir
);
  localparam logic [1:0] PC_HOLD = 2'd0, PC_SEQ = 2'd1, PC_REL = 2'd2, PC_ABS = 2'd3;

  inc32 u_inc (.a(pc), .y(pc_plus4));

  assign rel_target = pc + {{5{ir[24]}}, ir[24:0], 2'b00};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= RESET_ADDR;
      ir <= '0;
    end else begin
      if (ir_we) ir <= ir_in;
      unique case (pc_sel)
        PC_SEQ:  pc <= pc_plus4;
        PC_REL:  pc <= rel_target;
        PC_ABS:  pc <= {abs_target[31:2], 2'b00};
        default: pc <= pc;
      endcase
    end
  end
endmodule
