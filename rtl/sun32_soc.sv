// sun32_soc: the sun32 system on chip.
//
// The sun32 core is the only master of one AHB-Lite bus. On the bus sit
// the instruction memory and the data memory (16384 words each), the
// interrupt controller's registers, the UART sender and receiver (each
// with a 256-byte FIFO and its own 19200 bit/s baud rate generator
// running from the 50 MHz clock), the timer, an LED output port and a
// switch input port. The interrupt controller talks to the core over
// int / ack / vector / eoi and collects the device interrupts: irq0 is the
// timer, irq1 the UART receiver (FIFO full), irq2 the UART sender (FIFO
// empty); irq3..irq7 are brought out as inputs for external devices.
//
// Address map: 0x0000_0000 instruction memory (vector table at 0, reset
// entry at 0x20), 0x0001_0000 data memory, 0x8000_0000 interrupt
// controller, 0x8000_1000 UART sender, 0x8000_2000 UART receiver,
// 0x8000_3000 timer, 0x8000_4000 LED, 0x8000_5000 SW.
//
// The set of devices, the single AHB-Lite bus, the memory size, the UART
// buffer size and bit rate and the interrupt wiring between controller and
// core follow the document. The address map, the assignment of devices to
// irq lines and the widths of the LED and SW ports are this design's
// choices. Memories are not initialised: a program is loaded into the
// instruction memory before reset is released (for example by a
// testbench). All logic runs on the single clock clk with the active-low
// asynchronous reset rst_n.
module sun32_soc
  import sun32_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned BAUD       = 19200,
  parameter int unsigned UART_DIV   = CLK_HZ / BAUD,
  parameter int unsigned UART_DEPTH = 256,
  parameter int unsigned IMEM_WORDS = 16384,
  parameter int unsigned DMEM_WORDS = 16384,
  parameter int unsigned GPIO_W     = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              uart_txd,
  input  logic              uart_rxd,
  output logic [GPIO_W-1:0] led,
  input  logic [GPIO_W-1:0] sw,
  input  logic [7:3]        ext_irq
);
  ahb_m2s_t              m;
  ahb_s2m_t              s [NUM_SLAVES];
  logic [NUM_SLAVES-1:0] hsel;
  logic                  hready, hresp;
  logic [31:0]           hrdata;

  logic       intr, ack, eoi;
  logic [2:0] vector;
  logic [7:0] irq;
  logic       irq_timer, irq_rx_full, irq_tx_empty;

  core u_core (
    .clk, .rst_n, .m, .hready, .hrdata, .hresp, .intr, .ack, .eoi, .vector
  );

  ahb_interconnect u_bus (
    .clk, .rst_n, .m, .hsel, .s, .hready, .hrdata, .hresp
  );

  ahb_sram #(.DEPTH(IMEM_WORDS)) u_imem (
    .clk, .rst_n, .hsel(hsel[S_IMEM]), .m, .hready, .s(s[S_IMEM])
  );

  ahb_sram #(.DEPTH(DMEM_WORDS)) u_dmem (
    .clk, .rst_n, .hsel(hsel[S_DMEM]), .m, .hready, .s(s[S_DMEM])
  );

  // register-mapped peripherals, each behind its own AHB-Lite slave port
  localparam int unsigned NP = 6;   // INTC, UTX, URX, TIMER, LED, SW
  logic        p_re [NP];
  logic        p_we [NP];
  logic [11:0] p_raddr [NP];
  logic [11:0] p_waddr [NP];
  logic [31:0] p_wdata [NP];
  logic [31:0] p_rdata [NP];

  for (genvar i = 0; i < NP; i++) begin : g_slv
    ahb_lite_slave #(.ADDR_W(12)) u_slv (
      .clk, .rst_n, .hsel(hsel[S_INTC + i]), .m, .hready, .s(s[S_INTC + i]),
      .reg_re(p_re[i]), .reg_we(p_we[i]), .reg_raddr(p_raddr[i]),
      .reg_waddr(p_waddr[i]), .reg_wdata(p_wdata[i]), .reg_rdata(p_rdata[i])
    );
  end

  assign irq = {ext_irq, irq_tx_empty, irq_rx_full, irq_timer};

  interrupt_ctr #(.NIRQ(8)) u_intc (
    .clk, .rst_n, .irq,
    .reg_re(p_re[0]), .reg_we(p_we[0]), .reg_raddr(p_raddr[0]), .reg_waddr(p_waddr[0]),
    .reg_wdata(p_wdata[0]), .reg_rdata(p_rdata[0]),
    .intr, .ack, .eoi, .vector
  );

  uart_sender #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .DIVISOR(UART_DIV), .DEPTH(UART_DEPTH)) u_utx (
    .clk, .rst_n,
    .reg_re(p_re[1]), .reg_we(p_we[1]), .reg_raddr(p_raddr[1]), .reg_waddr(p_waddr[1]),
    .reg_wdata(p_wdata[1]), .reg_rdata(p_rdata[1]),
    .txd(uart_txd), .irq_empty(irq_tx_empty)
  );

  uart_receiver #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .DIVISOR(UART_DIV), .DEPTH(UART_DEPTH)) u_urx (
    .clk, .rst_n,
    .reg_re(p_re[2]), .reg_we(p_we[2]), .reg_raddr(p_raddr[2]), .reg_waddr(p_waddr[2]),
    .reg_wdata(p_wdata[2]), .reg_rdata(p_rdata[2]),
    .rxd(uart_rxd), .irq_full(irq_rx_full)
  );

  timer #(.WIDTH(32)) u_timer (
    .clk, .rst_n,
    .reg_re(p_re[3]), .reg_we(p_we[3]), .reg_raddr(p_raddr[3]), .reg_waddr(p_waddr[3]),
    .reg_wdata(p_wdata[3]), .reg_rdata(p_rdata[3]),
    .irq(irq_timer)
  );

  gpio_led #(.WIDTH(GPIO_W)) u_led (
    .clk, .rst_n,
    .reg_re(p_re[4]), .reg_we(p_we[4]), .reg_raddr(p_raddr[4]), .reg_waddr(p_waddr[4]),
    .reg_wdata(p_wdata[4]), .reg_rdata(p_rdata[4]),
    .led
  );

  gpio_sw #(.WIDTH(GPIO_W)) u_sw (
    .clk, .rst_n,
    .reg_re(p_re[5]), .reg_we(p_we[5]), .reg_raddr(p_raddr[5]), .reg_waddr(p_waddr[5]),
    .reg_wdata(p_wdata[5]), .reg_rdata(p_rdata[5]),
    .sw
  );
endmodule
