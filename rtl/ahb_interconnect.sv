// ahb_interconnect: AHB-Lite address decoder and slave multiplexer.
//
// Decodes the address-phase HADDR into one select line per slave, keeps
// the selected slave number for the data phase, and returns that slave's
// HRDATA, HREADYOUT and HRESP to the master (HREADY is also fed back to
// every slave). An address that maps to no slave selects nothing and
// completes with zero wait states and read data zero. The map: 0x0000_xxxx
// instruction memory, 0x0001_xxxx data memory, 0x8000_0xxx interrupt
// controller, 0x8000_1xxx UART sender, 0x8000_2xxx UART receiver,
// 0x8000_3xxx timer, 0x8000_4xxx LED, 0x8000_5xxx SW, taken from the
// SLV_BASE / SLV_MASK table in sun32_pkg. One AHB-Lite bus
// with these devices follows the document's SoC diagram; the map is this
// design's own.
module ahb_interconnect
  import sun32_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  ahb_m2s_t              m,
  output logic [NUM_SLAVES-1:0] hsel,
  input  ahb_s2m_t              s [NUM_SLAVES],
  output logic                  hready,
  output logic [31:0]           hrdata,
  output logic                  hresp
);
  logic [NUM_SLAVES-1:0] sel_q;

  always_comb begin
    for (int i = 0; i < NUM_SLAVES; i++)
      hsel[i] = (m.haddr & SLV_MASK[i]) == SLV_BASE[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sel_q <= '0;
    else if (hready) sel_q <= m.htrans[1] ? hsel : '0;
  end

  always_comb begin
    hready = 1'b1;
    hrdata = '0;
    hresp  = 1'b0;
    for (int i = 0; i < NUM_SLAVES; i++) begin
      if (sel_q[i]) begin
        hready = s[i].hreadyout;
        hrdata = s[i].hrdata;
        hresp  = s[i].hresp;
      end
    end
  end
endmodule
