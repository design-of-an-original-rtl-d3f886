// ahb_lite_slave: AHB-Lite slave front end for the register-mapped
// peripherals (interrupt controller, UART, timer, LED, SW).
//
// In the address phase of a selected read it raises reg_re for one cycle
// with reg_raddr and captures the peripheral's combinational reg_rdata into
// HRDATA, which is then valid in the data phase. For a write it remembers
// the address in the address phase and raises reg_we with reg_waddr and the HWDATA of
// the data phase. It never inserts wait states and never answers with an
// error. Only the low ADDR_W address bits reach the peripheral. The use of
// an AHB-Lite slave per device follows the document; the register-port
// protocol is this design's choice.
module ahb_lite_slave
  import sun32_pkg::*;
#(
  parameter int unsigned ADDR_W = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              hsel,
  input  ahb_m2s_t          m,
  input  logic              hready,
  output ahb_s2m_t          s,
  output logic              reg_re,
  output logic              reg_we,
  output logic [ADDR_W-1:0] reg_raddr,
  output logic [ADDR_W-1:0] reg_waddr,
  output logic [31:0]       reg_wdata,
  input  logic [31:0]       reg_rdata
);
  logic              aphase, wr_pend;
  logic [ADDR_W-1:0] waddr;
  logic [31:0]       rdata_q;

  assign aphase = hsel && hready && m.htrans[1];

  assign reg_re    = aphase && !m.hwrite;
  assign reg_we    = wr_pend;
  assign reg_raddr = m.haddr[ADDR_W-1:0];
  assign reg_waddr = waddr;
  assign reg_wdata = m.hwdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pend <= 1'b0;
      waddr   <= '0;
      rdata_q <= '0;
    end else begin
      wr_pend <= aphase && m.hwrite;
      if (aphase && m.hwrite) waddr <= m.haddr[ADDR_W-1:0];
      if (reg_re) rdata_q <= reg_rdata;
    end
  end

  assign s.hrdata    = rdata_q;
  assign s.hreadyout = 1'b1;
  assign s.hresp     = 1'b0;
endmodule
