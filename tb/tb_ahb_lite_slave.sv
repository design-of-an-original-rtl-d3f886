// tb_ahb_lite_slave: AHB-Lite reads and writes through the slave front end
// into a register model; checks reg_re/reg_we strobes, addresses, write
// data in the data phase and read data returned in the data phase.
module tb_ahb_lite_slave;
  import sun32_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0, hsel, hready = 1;
  ahb_m2s_t m;
  ahb_s2m_t s;
  logic reg_re, reg_we;
  logic [11:0] reg_raddr, reg_waddr;
  logic [31:0] reg_wdata, reg_rdata;
  logic [31:0] regs [16];
  int n_re, n_we;
  ahb_lite_slave #(.ADDR_W(12)) dut (.*);
  always #5 clk = ~clk;
  assign reg_rdata = regs[reg_raddr[5:2]];
  always_ff @(posedge clk) begin
    if (reg_we) regs[reg_waddr[5:2]] <= reg_wdata;
    if (reg_re) n_re <= n_re + 1;
    if (reg_we) n_we <= n_we + 1;
  end
  initial begin
    int exp_re = 0, exp_we = 0;
    m = '0; hsel = 0; n_re = 0; n_we = 0;
    for (int i = 0; i < 16; i++) regs[i] = 32'h1000 + i;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      logic [31:0] a, d; logic w, sel;
      a = {20'h80001, 6'd0, 4'($urandom), 2'b00}; d = $urandom; w = $urandom % 2; sel = ($urandom % 4) != 0;
      @(negedge clk);
      hsel = sel; m.htrans = HTRANS_NONSEQ; m.haddr = a; m.hwrite = w; m.hsize = SZ_WORD;
      #1;
      if (sel && !w) begin
        `CHECK_EQ(reg_re, 1'b1, "read strobe in address phase")
        `CHECK_EQ(reg_raddr, a[11:0], "read address")
      end else `CHECK_EQ(reg_re, 1'b0, "no read strobe")
      @(negedge clk);
      hsel = 0; m.htrans = HTRANS_IDLE; m.hwdata = d;
      #1;
      if (sel && w) begin
        `CHECK_EQ(reg_we, 1'b1, "write strobe in data phase")
        `CHECK_EQ(reg_waddr, a[11:0], "write address")
        `CHECK_EQ(reg_wdata, d, "write data")
        exp_we++;
      end else `CHECK_EQ(reg_we, 1'b0, "no write strobe")
      if (sel && !w) begin
        `CHECK_EQ(s.hrdata, regs[a[5:2]], "read data in data phase")
        exp_re++;
      end
      `CHECK_EQ(s.hreadyout, 1'b1, "hreadyout")
    end
    @(negedge clk);
    `CHECK_EQ(n_re, exp_re, "read strobe count")
    `CHECK_EQ(n_we, exp_we, "write strobe count")
    `TB_END
  end
  initial begin repeat (20000) @(posedge clk); failures++; `TB_END end
endmodule
