// ahb_sram: word-organised memory on the AHB-Lite bus, used for both the
// instruction memory and the data memory of the SoC.
//
// DEPTH 32-bit words (16384 by default, 64 KiB, as in the document's FPGA
// build, which used block RAM for both memories). The read is synchronous:
// the word addressed in the address phase is read on that clock edge and
// is on HRDATA during the data phase, so the memory never needs wait
// states. A write is remembered in the address phase and performed with
// byte enables (from HSIZE and HADDR[1:0]) in the data phase. A read in
// the same cycle as a pending write to the same word sees the new data.
// Contents are not reset; a testbench or boot loader fills them.
module ahb_sram
  import sun32_pkg::*;
#(
  parameter int unsigned DEPTH = 16384
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     hsel,
  input  ahb_m2s_t m,
  input  logic     hready,
  output ahb_s2m_t s
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [31:0]   mem [DEPTH];
  logic          aphase, wr_pend;
  logic [AW-1:0] waddr;
  logic [3:0]    wbe, be_a;
  logic [31:0]   rdata_q;
  logic [AW-1:0] raddr;

  assign aphase = hsel && hready && m.htrans[1];
  assign raddr  = m.haddr[AW+1:2];

  // byte enables of the address-phase transfer
  always_comb begin
    unique case (m.hsize)
      SZ_BYTE: be_a = 4'b0001 << m.haddr[1:0];
      SZ_HALF: be_a = m.haddr[1] ? 4'b1100 : 4'b0011;
      default: be_a = 4'b1111;
    endcase
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      if (wr_pend && wbe[i]) mem[waddr][8*i +: 8] <= m.hwdata[8*i +: 8];
      if (aphase && !m.hwrite)
        rdata_q[8*i +: 8] <= (wr_pend && wbe[i] && waddr == raddr) ? m.hwdata[8*i +: 8]
                                                                   : mem[raddr][8*i +: 8];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pend <= 1'b0;
      waddr   <= '0;
      wbe     <= '0;
    end else begin
      wr_pend <= aphase && m.hwrite;
      if (aphase && m.hwrite) begin
        waddr <= raddr;
        wbe   <= be_a;
      end
    end
  end

  assign s.hrdata    = rdata_q;
  assign s.hreadyout = 1'b1;
  assign s.hresp     = 1'b0;
endmodule
