// tb_ahb_sram: AHB-Lite reads and writes of bytes, halfwords and words at
// random addresses, checked against a byte-array model; also back-to-back
// write then read of the same word (data-phase write, address-phase read).
module tb_ahb_sram;
  import sun32_pkg::*;
  `include "tb_check.svh"
  localparam int DEPTH = 256;
  logic clk = 0, rst_n = 0, hsel = 1, hready;
  ahb_m2s_t m;
  ahb_s2m_t s;
  logic [7:0] model [DEPTH*4];
  ahb_sram #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .hsel, .m, .hready, .s);
  assign hready = s.hreadyout;
  always #5 clk = ~clk;

  // one address phase; wdata_prev is driven as the data of the previous transfer
  task automatic aphase(input logic [31:0] a, input logic w, input logic [2:0] sz,
                        input logic [31:0] wdata_prev);
    @(negedge clk);
    m.htrans = HTRANS_NONSEQ; m.haddr = a; m.hwrite = w; m.hsize = sz; m.hwdata = wdata_prev;
  endtask
  task automatic idle(input logic [31:0] wdata_prev);
    @(negedge clk);
    m.htrans = HTRANS_IDLE; m.hwdata = wdata_prev;
  endtask

  function automatic logic [31:0] lanes(logic [31:0] d, logic [2:0] sz);
    return sz == 0 ? {4{d[7:0]}} : sz == 1 ? {2{d[15:0]}} : d;
  endfunction

  initial begin
    m = '0;
    for (int i = 0; i < DEPTH*4; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // clear memory with word writes
    for (int i = 0; i < DEPTH; i++) begin
      aphase(i*4, 1, SZ_WORD, 0);
      idle(0);
    end
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] a, d, exp_d; logic [2:0] sz; logic w;
      sz = 3'($urandom % 3); a = ($urandom % (DEPTH*4)); d = $urandom;
      a = a & ~((32'd1 << sz) - 1);
      w = $urandom % 2;
      aphase(a, w, sz, 0);
      if (w) begin
        // data phase of the write, with a read of the same word in its address phase
        aphase(a & ~32'h3, 0, SZ_WORD, lanes(d, sz));
        for (int k = 0; k < (1 << sz); k++) model[a + k] = d[8*k +: 8];
        idle(0);
        @(posedge clk); #1;
        exp_d = {model[(a&~3)+3], model[(a&~3)+2], model[(a&~3)+1], model[a&~3]};
        `CHECK_EQ(s.hrdata, exp_d, "read after write")
      end else begin
        idle(0);
        @(posedge clk); #1;
        exp_d = {model[(a&~3)+3], model[(a&~3)+2], model[(a&~3)+1], model[a&~3]};
        `CHECK_EQ(s.hrdata, exp_d, "read")
      end
      `CHECK_EQ(s.hreadyout, 1'b1, "no wait states")
    end
    `TB_END
  end
  initial begin repeat (20000) @(posedge clk); failures++; `TB_END end
endmodule
