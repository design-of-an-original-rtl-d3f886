// tb_ahb_lite_master: issues random reads and writes through the master
// into a behavioural AHB-Lite slave that inserts random wait states, and
// checks the address-phase signals, the write data, the returned read
// data, the done pulse and the two-cycle minimum transfer time.
module tb_ahb_lite_master;
  import sun32_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  logic req = 0, write = 0, done, err, busy, hready, hresp;
  logic [31:0] addr = 0, wdata = 0, rdata, hrdata;
  logic [2:0] size = 2;
  ahb_m2s_t m;
  logic [31:0] mem [64];
  int waits, wait_cnt;
  logic dph, dph_w; logic [31:0] dph_a;

  ahb_lite_master dut (.*);
  always #5 clk = ~clk;

  // behavioural slave: word memory with 0..2 wait states per transfer
  assign hready = !dph || (wait_cnt == 0);
  assign hrdata = (dph && hready && !dph_w) ? mem[dph_a[7:2]] : 32'hDEAD_BEEF;
  assign hresp  = 1'b0;
  always_ff @(posedge clk) begin
    if (!rst_n) begin dph <= 0; wait_cnt <= 0; end
    else begin
      if (dph && wait_cnt != 0) wait_cnt <= wait_cnt - 1;
      if (dph && hready && dph_w) mem[dph_a[7:2]] <= m.hwdata;
      if (hready) begin
        dph <= m.htrans[1];
        dph_w <= m.hwrite; dph_a <= m.haddr;
        if (m.htrans[1]) wait_cnt <= waits;
      end
    end
  end

  initial begin
    for (int i = 0; i < 64; i++) mem[i] = i * 32'h0101_0101;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      int cyc; logic [31:0] exp_r;
      @(negedge clk);
      waits = $urandom % 3;
      addr = {24'd0, 6'($urandom), 2'b00}; write = $urandom % 2; wdata = $urandom; size = 2;
      exp_r = mem[addr[7:2]];
      req = 1; cyc = 0;
      #1;
      `CHECK_EQ(m.htrans, HTRANS_NONSEQ, "address phase at once")
      `CHECK_EQ(m.haddr, addr, "haddr")
      `CHECK_EQ(m.hwrite, write, "hwrite")
      do begin @(negedge clk); cyc++; end while (!done);
      `CHECK_EQ(cyc, 1 + waits, "transfer cycles after the address phase")
      if (!write) `CHECK_EQ(rdata, exp_r, "read data")
      @(negedge clk);
      req = 0;
      if (write) `CHECK_EQ(mem[addr[7:2]], wdata, "write data")
    end
    `TB_END
  end
  initial begin repeat (20000) @(posedge clk); failures++; `TB_END end
endmodule
