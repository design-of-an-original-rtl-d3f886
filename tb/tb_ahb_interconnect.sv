// tb_ahb_interconnect: checks the address decoder for every region of the
// map and unmapped addresses, and that the data-phase multiplexer returns
// the slave selected in the previous address phase, with its HREADY.
module tb_ahb_interconnect;
  import sun32_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0, hready, hresp;
  ahb_m2s_t m;
  logic [NUM_SLAVES-1:0] hsel;
  ahb_s2m_t s [NUM_SLAVES];
  logic [31:0] hrdata;
  ahb_interconnect dut (.*);
  always #5 clk = ~clk;

  function automatic int exp_slave(logic [31:0] a);
    if (a[31:16] == 16'h0000) return S_IMEM;
    if (a[31:16] == 16'h0001) return S_DMEM;
    if (a[31:12] == 20'h80000) return S_INTC;
    if (a[31:12] == 20'h80001) return S_UTX;
    if (a[31:12] == 20'h80002) return S_URX;
    if (a[31:12] == 20'h80003) return S_TIMER;
    if (a[31:12] == 20'h80004) return S_LED;
    if (a[31:12] == 20'h80005) return S_SW;
    return -1;
  endfunction

  initial begin
    logic [31:0] bases [10];
    bases = '{32'h0, 32'h1_0000, 32'h8000_0000, 32'h8000_1000, 32'h8000_2000,
              32'h8000_3000, 32'h8000_4000, 32'h8000_5000, 32'h8000_6000, 32'h4000_0000};
    m = '0;
    for (int i = 0; i < NUM_SLAVES; i++) s[i] = '{hrdata: 32'hA000 + i, hreadyout: 1, hresp: 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      int e;
      @(negedge clk);
      m.htrans = HTRANS_NONSEQ;
      m.haddr  = bases[$urandom % 10] + ($urandom % 4096);
      e = exp_slave(m.haddr);
      #1;
      `CHECK_EQ(hsel, (e < 0) ? '0 : NUM_SLAVES'(1) << e, "hsel decode")
      @(negedge clk);
      // idle cycle on another address: the data phase must still follow
      // the slave chosen in the address phase
      m.htrans = HTRANS_IDLE;
      m.haddr  = bases[(e + 3) % 8];
      if (e >= 0) s[e].hreadyout = 0;
      #1;
      `CHECK_EQ(hrdata, (e < 0) ? 32'd0 : 32'hA000 + e, "data-phase mux")
      `CHECK_EQ(hready, (e < 0), "hready from selected slave")
      if (e >= 0) s[e].hreadyout = 1;
    end
    `TB_END
  end
  initial begin repeat (20000) @(posedge clk); failures++; `TB_END end
endmodule
