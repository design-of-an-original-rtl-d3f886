// reg32: the sun32 general-purpose register file.
//
// Thirty-two 32-bit registers r0..r31 with two combinational read ports
// and one write port written on the rising clock edge. r0 always reads
// zero and ignores writes, as the ISA requires; r31 is the link register
// written by call (that is decided by the core, not here). The registers
// reset to zero (this design's choice, so that simulation starts from a
// known state).
module reg32 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  output logic [31:0] rd1,
  output logic [31:0] rd2,
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [31:0] wd
);
  logic [31:0] regs [1:31];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < 32; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == 5'd0) ? 32'd0 : regs[ra1];
  assign rd2 = (ra2 == 5'd0) ? 32'd0 : regs[ra2];
endmodule
