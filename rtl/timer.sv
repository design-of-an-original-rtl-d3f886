// timer: interval timer of the sun32 SoC.
//
// While EN is set the count register TMCNT is incremented by one every
// clock (50 MHz in the document's system). The incremented value is
// compared with the compare register TMCMP (TMCNT <= TMCMP): as long as it
// does not exceed TMCMP it is stored; when it would, the timer has
// expired: TMCNT restarts at zero and irq pulses for one cycle. The period
// is therefore TMCMP + 1 clocks (50,000,000 clocks, TMCMP = 49,999,999,
// for the one-second tick of the document's RTOS demonstration).
//
// Registers (byte offsets): 0x0 TMCNT (r/w), 0x4 TMCMP (r/w), 0x8 EN
// (bit 0, r/w).
//
// TMCNT, TMCMP, EN, the +1 incrementer and the TMCNT <= TMCMP comparison
// are the blocks of the document's timer diagram, and an interrupt on
// expiry is stated in its text; the restart at zero, the register map and
// the reset values (all zero) are this design's choices.
module timer #(
  parameter int unsigned WIDTH = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        reg_re,
  input  logic        reg_we,
  input  logic [11:0] reg_raddr,
  input  logic [11:0] reg_waddr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  output logic        irq
);
  logic [WIDTH-1:0] tmcnt, tmcmp, nxt;
  logic             en, in_range;

  assign nxt    = tmcnt + WIDTH'(1);
  assign in_range = (nxt <= tmcmp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmcnt <= '0;
      tmcmp <= '0;
      en    <= 1'b0;
      irq   <= 1'b0;
    end else begin
      irq <= 1'b0;
      if (reg_we && reg_waddr == 12'h000)      tmcnt <= reg_wdata[WIDTH-1:0];
      else if (en) begin
        if (in_range) tmcnt <= nxt;
        else begin
          tmcnt <= '0;
          irq   <= 1'b1;
        end
      end
      if (reg_we && reg_waddr == 12'h004) tmcmp <= reg_wdata[WIDTH-1:0];
      if (reg_we && reg_waddr == 12'h008) en    <= reg_wdata[0];
    end
  end

  always_comb begin
    unique case (reg_raddr)
      12'h000: reg_rdata = 32'(tmcnt);
      12'h004: reg_rdata = 32'(tmcmp);
      12'h008: reg_rdata = 32'(en);
      default: reg_rdata = '0;
    endcase
  end

  logic unused;
  assign unused = reg_re;
endmodule
