// ahb_lite_master: AHB-Lite master port of the sun32 core.
//
// Turns one request from the core (req held high with addr, write, size
// and wdata stable) into a single AHB-Lite NONSEQ transfer. While idle the
// request is put on the bus at once as the address phase; in the next
// cycle (data phase) the write data are driven, and when the slave signals
// HREADY the transfer ends: done pulses for one cycle and rdata carries the
// read data (valid in that cycle only). A transfer therefore takes two
// cycles with a zero-wait-state slave, plus one per wait state. Only single
// transfers are issued (no bursts, HTRANS IDLE or NONSEQ); HRESP errors are
// reported on err with done. HTRANS is IDLE while reset is asserted. The use of AHB-Lite follows the document; the
// request handshake towards the core is this design's choice.
module ahb_lite_master
  import sun32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // core side
  input  logic        req,
  input  logic [31:0] addr,
  input  logic        write,
  input  logic [2:0]  size,
  input  logic [31:0] wdata,
  output logic        done,
  output logic        err,
  output logic [31:0] rdata,
  output logic        busy,
  // bus side
  output ahb_m2s_t    m,
  input  logic        hready,
  input  logic [31:0] hrdata,
  input  logic        hresp
);
  logic        in_data;
  logic [31:0] wdata_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_data <= 1'b0;
      wdata_q <= '0;
    end else if (!in_data) begin
      if (req && hready) begin
        in_data <= 1'b1;
        wdata_q <= wdata;
      end
    end else if (hready) begin
      in_data <= 1'b0;
    end
  end

  always_comb begin
    m        = '0;
    m.htrans = HTRANS_IDLE;
    if (!in_data && req && rst_n) begin
      m.htrans = HTRANS_NONSEQ;
      m.haddr  = addr;
      m.hwrite = write;
      m.hsize  = size;
    end
    m.hwdata = wdata_q;
  end

  assign done  = in_data && hready;
  assign err   = in_data && hready && hresp;
  assign rdata = hrdata;
  assign busy  = in_data;
endmodule
