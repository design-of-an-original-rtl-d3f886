// baud_gen: baud rate generator of the UART.
//
// Divides the system clock (CLK_HZ, 50 MHz by default) down to the bit
// rate (BAUD, 19200 bit/s by default, giving DIVISOR = 2604 clocks per
// bit, 0.01 % fast). A counter runs from 0 to DIVISOR-1; tick pulses on
// its last count (end of a bit period) and mid on count DIVISOR/2-1 (the
// middle of a bit, where the receiver samples). clear restarts the count
// at zero so that periods line up with the start of a frame. The 50 MHz
// clock and the 19200 bit/s rate follow the document; the counter
// structure is this design's own.
module baud_gen #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned BAUD    = 19200,
  parameter int unsigned DIVISOR = CLK_HZ / BAUD
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  output logic tick,
  output logic mid
);
  localparam int unsigned CW = $clog2(DIVISOR);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           cnt <= '0;
    else if (clear || cnt == CW'(DIVISOR - 1)) cnt <= '0;
    else                                  cnt <= cnt + CW'(1);
  end

  assign tick = !clear && (cnt == CW'(DIVISOR - 1));
  assign mid  = !clear && (cnt == CW'(DIVISOR / 2 - 1));

  initial assert (DIVISOR >= 4) else $error("baud_gen DIVISOR too small");
endmodule
