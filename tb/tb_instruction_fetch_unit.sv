// tb_instruction_fetch_unit: reset address, sequential step, PC-relative
// targets with positive and negative offsets, absolute jumps and IR load.
module tb_instruction_fetch_unit;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0, ir_we = 0;
  logic [1:0] pc_sel = 0;
  logic [31:0] abs_target = 0, ir_in = 0, pc, pc_plus4, rel_target, ir;
  instruction_fetch_unit dut (.*);
  always #5 clk = ~clk;
  initial begin
    logic [31:0] model;
    repeat (2) @(posedge clk);
    `CHECK_EQ(pc, 32'h20, "reset pc")
    rst_n = 1;
    model = 32'h20;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      ir_we = 1; ir_in = $urandom;
      @(negedge clk);
      ir_we = 0;
      `CHECK_EQ(ir, ir_in, "ir")
      `CHECK_EQ(rel_target, model + {{5{ir_in[24]}}, ir_in[24:0], 2'b00}, "relative target")
      `CHECK_EQ(pc_plus4, model + 4, "pc+4")
      pc_sel = 2'($urandom); abs_target = $urandom;
      case (pc_sel)
        1: model = model + 4;
        2: model = model + {{5{ir_in[24]}}, ir_in[24:0], 2'b00};
        3: model = {abs_target[31:2], 2'b00};
        default: ;
      endcase
      @(negedge clk);
      pc_sel = 0;
      `CHECK_EQ(pc, model, "pc")
    end
    `TB_END
  end
  initial begin repeat (5000) @(posedge clk); failures++; `TB_END end
endmodule
