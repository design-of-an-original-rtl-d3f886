// tb_interrupt_ctr: random request patterns, masks and enables against a
// model of the priority rule; checks int, the vector in the cycle after
// ack, IRR/ISR updates, that no second interrupt is raised before eoi,
// and software interrupts posted by writing IRR.
module tb_interrupt_ctr;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  logic [7:0] irq = 0;
  logic reg_re = 0, reg_we = 0, intr, ack = 0, eoi = 0;
  logic [11:0] reg_raddr = 0, reg_waddr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic [2:0] vector;
  interrupt_ctr dut (.*);
  always #5 clk = ~clk;
  `include "tb_regport.svh"
  initial begin
    logic [7:0] irr_m, imr_m, pend; logic [31:0] d; int exp_v;
    repeat (2) @(posedge clk);
    rst_n = 1;
    irr_m = 0;
    reg_write(12'h008, 1);
    for (int i = 0; i < 300; i++) begin
      imr_m = ($urandom % 3 == 0) ? 8'($urandom) : 8'h00;
      reg_write(12'h004, imr_m);
      if (i % 4 == 0) begin
        // software interrupt: write IRR
        d = 32'(8'($urandom));
        reg_write(12'h000, d);
        irr_m = d[7:0];
      end else begin
        @(negedge clk); irq = 8'($urandom) & 8'($urandom); @(negedge clk); irr_m |= irq; irq = 0;
      end
      reg_read(12'h000, d);
      `CHECK_EQ(d[7:0], irr_m, "IRR holds requests")
      pend = irr_m & ~imr_m;
      #1;
      `CHECK_EQ(intr, pend != 0, "int raised for pending unmasked request")
      if (pend != 0) begin
        exp_v = 0;
        while (!pend[exp_v]) exp_v++;
        @(negedge clk); ack = 1; @(negedge clk); ack = 0;
        `CHECK_EQ(vector, 3'(exp_v), "vector in cycle after ack")
        irr_m[exp_v] = 0;
        reg_read(12'h00C, d);
        `CHECK_EQ(d[7:0], 8'(1 << exp_v), "ISR")
        // raise another request: no nesting until eoi
        @(negedge clk); irq = 8'h01; @(negedge clk); irq = 0; irr_m[0] = 1;
        #1 `CHECK_EQ(intr, 1'b0, "no nesting while in service")
        @(negedge clk); eoi = 1; @(negedge clk); eoi = 0;
        reg_read(12'h00C, d);
        `CHECK_EQ(d[7:0], 8'h00, "ISR cleared by eoi")
      end
      // drain: clear IRR for the next round
      reg_write(12'h000, 0); irr_m = 0;
    end
    // global enable off blocks int
    reg_write(12'h004, 0);
    reg_write(12'h008, 0);
    reg_write(12'h000, 8'h80);
    #1 `CHECK_EQ(intr, 1'b0, "EN=0 blocks int")
    `TB_END
  end
  initial begin repeat (50000) @(posedge clk); failures++; `TB_END end
endmodule
