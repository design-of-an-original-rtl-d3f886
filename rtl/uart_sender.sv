// uart_sender: UART transmitter with a 256-byte FIFO.
//
// Bytes written to the DATA register enter the FIFO (a write to a full
// FIFO is dropped). While EN is set and the FIFO holds data, the
// transmitter takes the head byte and sends one 8N1 frame on txd: a start
// bit (0), eight data bits least significant first, and a stop bit (1),
// each one baud period long (from baud_gen). txd idles high. The
// interrupt request irq_empty pulses for one cycle when the FIFO becomes
// empty while EN is set, telling software that there is room again.
//
// Registers (byte offsets): 0x0 DATA (write: push byte [7:0]),
// 0x4 STATUS (read: bit 0 FIFO empty, bit 1 FIFO full, bit 2 frame in
// progress, bits [16:8] FIFO count), 0x8 EN (bit 0, r/w).
//
// The FIFO, its 256-byte size, the baud rate generator, EN and the
// "buffer empty" interrupt come from the document's block diagram; the
// frame format, the register map and the pulse form of the interrupt are
// this design's choices.
module uart_sender #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned BAUD    = 19200,
  parameter int unsigned DIVISOR = CLK_HZ / BAUD,
  parameter int unsigned DEPTH   = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        reg_re,
  input  logic        reg_we,
  input  logic [11:0] reg_raddr,
  input  logic [11:0] reg_waddr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  output logic        txd,
  output logic        irq_empty
);
  localparam int unsigned CW = $clog2(DEPTH) + 1;

  logic          en, push, pop, empty, full, empty_q;
  logic [7:0]    head;
  logic [CW-1:0] count;
  logic          tick, bclear, active;
  logic [8:0]    shreg;     // {data, start} still to send, LSB first
  logic [3:0]    nbits;     // bits left including the stop bit

  assign push = reg_we && reg_waddr == 12'h000;

  fifo #(.WIDTH(8), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .push, .wdata(reg_wdata[7:0]), .pop, .rdata(head),
    .empty, .full, .count
  );

  baud_gen #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .DIVISOR(DIVISOR)) u_baud (
    .clk, .rst_n, .clear(bclear), .tick, .mid()
  );

  // start a new frame when idle, enabled and data is waiting
  assign pop    = !active && en && !empty;
  assign bclear = pop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en      <= 1'b0;
      active  <= 1'b0;
      shreg   <= '1;
      nbits   <= '0;
      txd     <= 1'b1;
      empty_q <= 1'b1;
    end else begin
      empty_q <= empty;
      if (reg_we && reg_waddr == 12'h008) en <= reg_wdata[0];
      if (pop) begin
        active <= 1'b1;
        txd    <= 1'b0;                 // start bit
        shreg  <= {1'b1, head};         // data then stop
        nbits  <= 4'd9;
      end else if (active && tick) begin
        if (nbits == 4'd0) begin
          active <= 1'b0;               // stop bit finished
        end else begin
          txd   <= shreg[0];
          shreg <= {1'b1, shreg[8:1]};
          nbits <= nbits - 4'd1;
        end
      end
    end
  end

  assign irq_empty = en && empty && !empty_q;

  always_comb begin
    unique case (reg_raddr)
      12'h004: reg_rdata = 32'({count, 5'd0, active, full, empty});
      12'h008: reg_rdata = 32'(en);
      default: reg_rdata = '0;
    endcase
  end

  logic unused;
  assign unused = reg_re;
endmodule
