// uart_receiver: UART receiver with a 256-byte FIFO.
//
// rxd is synchronised by two flip-flops. While EN is set and the line is
// idle, a falling edge starts a frame: the baud rate generator is
// restarted so that its mid pulse falls in the middle of each bit. The
// start bit is checked at its middle (a high level there is taken as noise
// and the receiver goes back to idle), the eight data bits are sampled
// least significant first, and at the middle of the stop bit the byte is
// pushed into the FIFO if the stop bit is high and the FIFO has room
// (otherwise the byte is lost and the overrun or framing flag is set).
// Reading the DATA register returns the head byte and removes it. The
// interrupt request irq_full pulses for one cycle when the FIFO becomes
// full while EN is set.
//
// Registers (byte offsets): 0x0 DATA (read: [7:0] head byte, popped; bit 8
// set when the FIFO was empty), 0x4 STATUS (read: bit 0 FIFO empty, bit 1
// FIFO full, bit 2 frame in progress, bit 3 overrun, bit 4 framing error,
// bits [16:8] FIFO count; a write clears bits 3 and 4), 0x8 EN (bit 0).
//
// The FIFO and its size, the baud rate generator, EN and the "buffer
// full" interrupt come from the document's block diagram; the sampling
// scheme, the frame format, the error flags and the register map are this
// design's choices.
module uart_receiver #(
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
  input  logic        rxd,
  output logic        irq_full
);
  localparam int unsigned CW = $clog2(DEPTH) + 1;

  typedef enum logic [1:0] { R_IDLE, R_START, R_DATA, R_STOP } rstate_e;

  logic          en, push, pop, empty, full, full_q;
  logic [7:0]    head, shreg;
  logic [CW-1:0] count;
  logic          mid, bclear;
  logic [1:0]    sync;
  logic          rx, rx_q;
  logic [2:0]    bitn;
  logic          overrun, ferr;
  rstate_e       st;

  assign rx  = sync[1];
  assign pop = reg_re && reg_raddr == 12'h000;

  fifo #(.WIDTH(8), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .push, .wdata(shreg), .pop, .rdata(head),
    .empty, .full, .count
  );

  baud_gen #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .DIVISOR(DIVISOR)) u_baud (
    .clk, .rst_n, .clear(bclear), .tick(), .mid
  );

  assign bclear = (st == R_IDLE);
  assign push   = (st == R_STOP) && mid && rx && !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync    <= 2'b11;
      rx_q    <= 1'b1;
      en      <= 1'b0;
      st      <= R_IDLE;
      shreg   <= '0;
      bitn    <= '0;
      overrun <= 1'b0;
      ferr    <= 1'b0;
      full_q  <= 1'b0;
    end else begin
      sync   <= {sync[0], rxd};
      rx_q   <= rx;
      full_q <= full;
      if (reg_we && reg_waddr == 12'h008) en <= reg_wdata[0];
      if (reg_we && reg_waddr == 12'h004) begin
        overrun <= 1'b0;
        ferr    <= 1'b0;
      end
      unique case (st)
        R_IDLE:  if (en && rx_q && !rx) st <= R_START;
        R_START: if (mid) begin
                   st   <= rx ? R_IDLE : R_DATA;
                   bitn <= '0;
                 end
        R_DATA:  if (mid) begin
                   shreg <= {rx, shreg[7:1]};
                   bitn  <= bitn + 3'd1;
                   if (bitn == 3'd7) st <= R_STOP;
                 end
        R_STOP:  if (mid) begin
                   st <= R_IDLE;
                   if (!rx)      ferr    <= 1'b1;
                   else if (full) overrun <= 1'b1;
                 end
        default: st <= R_IDLE;
      endcase
    end
  end

  assign irq_full = en && full && !full_q;

  always_comb begin
    unique case (reg_raddr)
      12'h000: reg_rdata = {23'd0, empty, head};
      12'h004: reg_rdata = 32'({count, 3'd0, ferr, overrun, st != R_IDLE, full, empty});
      12'h008: reg_rdata = 32'(en);
      default: reg_rdata = '0;
    endcase
  end
endmodule
