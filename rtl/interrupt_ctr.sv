// interrupt_ctr: eight-input interrupt controller of the sun32 SoC.
//
// irq0..irq7 are collected in the Interrupt Request Register (IRR); a bit
// stays set until its request is accepted. The Interrupt Mask Register
// (IMR, 1 = masked) hides requests, EN is a global enable, and the
// priority check logic picks the pending unmasked request with the lowest
// number (irq0 highest). When EN is set, nothing is in service and a
// request is pending, int is raised to the CPU. The CPU answers with a
// one-cycle ack; on that edge the chosen request moves from IRR to the
// In-Service Register (ISR) and its number is presented on vector from the
// next cycle on (held until the next ack). The handler's reti raises eoi,
// which clears ISR. While ISR is non-zero int stays low: no nesting.
// Software can post a software interrupt by writing IRR.
//
// Registers (byte offsets): 0x0 IRR (r/w; a write replaces IRR, requests
// arriving in the same cycle are kept), 0x4 IMR (r/w), 0x8 EN (bit 0,
// r/w), 0xC ISR (read only), 0x10 current vector (read only).
//
// IRR, IMR, EN, ISR, the priority order, the ack/vector timing, eoi and
// the absence of nesting follow the document; the register offsets, the
// mask polarity, the reset values (everything zero, so interrupts start
// disabled) and the write semantics of IRR are this design's choices.
module interrupt_ctr #(
  parameter int unsigned NIRQ = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NIRQ-1:0]         irq,
  // register port
  input  logic                    reg_re,
  input  logic                    reg_we,
  input  logic [11:0]             reg_raddr,
  input  logic [11:0]             reg_waddr,
  input  logic [31:0]             reg_wdata,
  output logic [31:0]             reg_rdata,
  // CPU side
  output logic                    intr,
  input  logic                    ack,
  input  logic                    eoi,
  output logic [$clog2(NIRQ)-1:0] vector
);
  localparam int unsigned VW = $clog2(NIRQ);

  logic [NIRQ-1:0] irr, imr, isr, pending, grant;
  logic            en;
  logic [VW-1:0]   prio;

  assign pending = irr & ~imr;

  // priority check: lowest-numbered pending request wins
  always_comb begin
    prio  = '0;
    grant = '0;
    for (int i = NIRQ - 1; i >= 0; i--) begin
      if (pending[i]) begin
        prio  = VW'(i);
        grant = NIRQ'(1) << i;
      end
    end
  end

  assign intr = en && (isr == '0) && (pending != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irr    <= '0;
      imr    <= '0;
      isr    <= '0;
      en     <= 1'b0;
      vector <= '0;
    end else begin
      if (reg_we && reg_waddr == 12'h000) irr <= reg_wdata[NIRQ-1:0] | irq;
      else if (ack && intr)               irr <= (irr | irq) & ~grant;
      else                                irr <= irr | irq;
      if (reg_we && reg_waddr == 12'h004) imr <= reg_wdata[NIRQ-1:0];
      if (reg_we && reg_waddr == 12'h008) en  <= reg_wdata[0];
      if (ack && intr) begin
        isr    <= grant;
        vector <= prio;
      end else if (eoi) begin
        isr <= '0;
      end
    end
  end

  always_comb begin
    unique case (reg_raddr)
      12'h000: reg_rdata = 32'(irr);
      12'h004: reg_rdata = 32'(imr);
      12'h008: reg_rdata = 32'(en);
      12'h00C: reg_rdata = 32'(isr);
      12'h010: reg_rdata = 32'(vector);
      default: reg_rdata = '0;
    endcase
  end

  // the CPU acknowledges only a raised int
  a_ack_needs_int: assert property (@(posedge clk) disable iff (!rst_n) ack |-> intr);
  // at most one interrupt in service
  a_isr_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(isr));

  logic unused;
  assign unused = reg_re;
endmodule
