// End-to-end test of the sun32 SoC, shared by tb_sun32_soc (short UART bit
// time and small UART buffer) and tb_sun32_soc_full (all defaults). The
// including module defines DIV (clocks per UART bit), DEPTH (UART buffer
// entries), instantiates the SoC as dut, and provides clk, rst_n,
// uart_txd, uart_rxd, led, sw and ext_irq.
//
// The test assembles a program into the instruction memory that
//  - writes the LED port, reads the switches,
//  - enables the interrupt controller with irq3 masked,
//  - sends "Hi!\n" through the UART sender (then the buffer-empty
//    interrupt, irq2, fires),
//  - enables the UART receiver; the testbench sends DEPTH bytes so that
//    the buffer-full interrupt (irq1) fires and its handler drains and sums
//    the buffer,
//  - runs the timer with a 2000-clock period (irq0),
//  - posts a software interrupt by writing IRR (irq4),
//  - divides (div/rem), and waits in a loop for all interrupt counters.
// The testbench pulses external requests on irq6 (enabled) and irq3
// (masked). Each handler saves and restores PSR with mrs/msr, counts its
// vector in data memory and ends with reti. The testbench then compares
// the counters, the UART bytes, the received-byte sum, the division and
// the switch value with its own numbers, and counts how often each
// mechanism (interrupt taken, request held back while another is in
// service, masked request, divider stall, bus transfers per device)
// happened; a mechanism that never happened is a failure.

`include "sun32_asm.svh"

localparam logic [31:0] DMEM = 32'h0001_0000;
localparam logic [31:0] CNT  = DMEM + 32'h100;   // 8 interrupt counters
localparam logic [31:0] RSUM = DMEM + 32'h140;   // sum of received bytes
localparam logic [31:0] RES  = DMEM + 32'h200;   // results
localparam logic [7:0]  SWV  = 8'hC3;

logic [7:0] tx_bytes [$];
logic [7:0] leds_seen [$];
int rx_sum = 0;
int n_ack = 0, n_held = 0, n_masked = 0, n_div_stall = 0;
int n_fetch = 0, n_dmem = 0, n_periph = 0;
int n_vec [8];

// line decoder for uart_txd
initial begin
  forever begin
    logic [7:0] b;
    @(negedge uart_txd);
    repeat (DIV / 2) @(posedge clk);
    for (int k = 0; k < 8; k++) begin repeat (DIV) @(posedge clk); b[k] = uart_txd; end
    repeat (DIV) @(posedge clk);
    tx_bytes.push_back(b);
  end
end

// mechanism counters from the design's own signals
always @(posedge clk) if (rst_n) begin
  if (dut.ack) begin n_ack++; end
  if (dut.u_intc.isr != 0 && (dut.u_intc.irr & ~dut.u_intc.imr) != 0) n_held++;
  if ((dut.u_intc.irr & dut.u_intc.imr) != 0) n_masked++;
  if (dut.u_core.div_busy) n_div_stall++;
  if (dut.m.htrans[1]) begin
    if (dut.hsel[0]) n_fetch++;
    else if (dut.hsel[1]) n_dmem++;
    else n_periph++;
  end
  if (dut.u_intc.ack && dut.u_intc.intr) n_vec[dut.u_intc.prio]++;
end
always @(led) leds_seen.push_back(led);

task automatic uart_send(input logic [7:0] b);
  uart_rxd = 0; repeat (DIV) @(posedge clk);
  for (int k = 0; k < 8; k++) begin uart_rxd = b[k]; repeat (DIV) @(posedge clk); end
  uart_rxd = 1; repeat (DIV) @(posedge clk);
endtask

// handler for vector v: count, and for v == 1 drain the receive buffer
function automatic int handler(int v);
  int start, lp, done_at;
  start = at;
  emit(enc_i(7'h61, 5'd27, 5'd0, 14'd0));                 // mrs r27, psr
  li(5'd20, CNT + 32'(4 * v));
  emit(enc_i(7'h24, 5'd21, 5'd20, 14'd0));                // lw  r21, 0(r20)
  emit(enc_i(7'h10, 5'd21, 5'd21, 14'd1));                // addi r21, r21, 1
  emit(enc_i(7'h2A, 5'd21, 5'd20, 14'd0));                // sw  r21, 0(r20)
  if (v == 1) begin
    li(5'd22, 32'h8000_2000);                             // UART receiver
    li(5'd23, RSUM);
    lp = at;
    emit(enc_i(7'h24, 5'd24, 5'd22, 14'd0));              // lw  r24, DATA
    emit(enc_i(7'h18, 5'd25, 5'd24, 14'd0));              // (sll by 0: copy)
    emit(enc_i(7'h19, 5'd25, 5'd25, 14'd8));              // srl r25, r25, 8 (empty flag)
    emit(enc_i(7'h1E, 5'd0, 5'd25, 14'd0));               // cmpi r25, 0
    done_at = at;
    br(7'h42, done_at + 6);                               // bne done
    emit(enc_i(7'h24, 5'd26, 5'd23, 14'd0));              // lw  r26, sum
    emit(enc_r(7'h00, 5'd26, 5'd26, 5'd24));              // add r26, r26, r24
    emit(enc_i(7'h2A, 5'd26, 5'd23, 14'd0));              // sw  r26, sum
    br(7'h40, lp);                                        // b loop
    emit(enc_r(7'h00, 5'd0, 5'd0, 5'd0));                 // nop
  end
  emit(enc_i(7'h60, 5'd0, 5'd27, 14'd0));                 // msr psr, r27
  emit(enc_j(7'h62, 0));                                  // reti
  return start;
endfunction

initial begin
  int h [8], wait_at;
  logic [31:0] dv, ds;
  sw = SWV; ext_irq = '0; uart_rxd = 1;
  for (int i = 0; i < 8; i++) n_vec[i] = 0;
  dv = 32'd1_000_003; ds = 32'd7;
  // ---------------- program ----------------
  at = 8;
  li(5'd10, RES);
  li(5'd11, 32'h8000_0000);                                // interrupt controller
  li(5'd12, 32'h8000_1000);                                // UART sender
  li(5'd13, 32'h8000_2000);                                // UART receiver
  li(5'd14, 32'h8000_3000);                                // timer
  li(5'd15, 32'h8000_4000);                                // LED
  li(5'd16, 32'h8000_5000);                                // SW
  emit(enc_i(7'h10, 5'd1, 5'd0, 14'h5A));
  emit(enc_i(7'h2A, 5'd1, 5'd15, 14'd0));                  // LED = 0x5A
  emit(enc_i(7'h24, 5'd2, 5'd16, 14'd0));                  // r2 = SW
  emit(enc_i(7'h2A, 5'd2, 5'd10, 14'd0));                  // RES[0] = SW
  emit(enc_i(7'h10, 5'd1, 5'd0, 14'h08));
  emit(enc_i(7'h2A, 5'd1, 5'd11, 14'h4));                  // IMR = 0x08 (irq3 masked)
  emit(enc_i(7'h10, 5'd1, 5'd0, 14'd1));
  emit(enc_i(7'h2A, 5'd1, 5'd11, 14'h8));                  // EN = 1
  emit(enc_i(7'h2A, 5'd1, 5'd13, 14'h8));                  // UART receiver EN
  begin
    string s; s = "Hi!\n";
    for (int i = 0; i < s.len(); i++) begin
      emit(enc_i(7'h10, 5'd1, 5'd0, 14'(s[i])));
      emit(enc_i(7'h2A, 5'd1, 5'd12, 14'h0));              // push byte
    end
  end
  emit(enc_i(7'h10, 5'd1, 5'd0, 14'd1));
  emit(enc_i(7'h2A, 5'd1, 5'd12, 14'h8));                  // UART sender EN
  emit(enc_i(7'h10, 5'd1, 5'd0, 14'd1999));
  emit(enc_i(7'h2A, 5'd1, 5'd14, 14'h4));                  // TMCMP = 1999
  emit(enc_i(7'h10, 5'd1, 5'd0, 14'd1));
  emit(enc_i(7'h2A, 5'd1, 5'd14, 14'h8));                  // timer EN
  emit(enc_i(7'h10, 5'd1, 5'd0, 14'h10));
  emit(enc_i(7'h2A, 5'd1, 5'd11, 14'h0));                  // IRR = 0x10: software interrupt
  li(5'd3, dv); emit(enc_i(7'h10, 5'd4, 5'd0, 14'(ds)));
  emit(enc_r(7'h04, 5'd5, 5'd3, 5'd4));                    // div
  emit(enc_r(7'h06, 5'd6, 5'd3, 5'd4));                    // rem
  emit(enc_i(7'h2A, 5'd5, 5'd10, 14'h4));
  emit(enc_i(7'h2A, 5'd6, 5'd10, 14'h8));
  // wait until timer >= 3, rx-full, tx-empty, software and external counters are set
  li(5'd7, CNT);
  wait_at = at;
  emit(enc_i(7'h24, 5'd8, 5'd7, 14'h0));                   // timer count
  emit(enc_i(7'h1E, 5'd0, 5'd8, 14'd3));
  br(7'h45, wait_at);                                      // bult wait
  for (int v = 1; v <= 6; v++) begin
    if (v == 3 || v == 5) continue;
    emit(enc_i(7'h24, 5'd8, 5'd7, 14'(4 * v)));
    emit(enc_i(7'h1E, 5'd0, 5'd8, 14'd0));
    br(7'h41, wait_at);                                    // beq wait
  end
  emit(enc_i(7'h2A, 5'd0, 5'd14, 14'h8));                  // timer off
  emit(enc_i(7'h10, 5'd1, 5'd0, 14'hFF));
  emit(enc_i(7'h2A, 5'd1, 5'd15, 14'd0));                  // LED = 0xFF: done
  br(7'h40, at);                                           // spin
  for (int v = 0; v < 8; v++) h[v] = handler(v);
  for (int v = 0; v < 8; v++) prog[v] = 32'(h[v] * 4);
  for (int i = 0; i < at; i++) dut.u_imem.mem[i] = prog[i];
  for (int i = 0; i < 256; i++) dut.u_dmem.mem[i] = 0;

  // ---------------- run ----------------
  rst_n = 0;
  repeat (3) @(posedge clk);
  rst_n = 1;
  fork
    begin
      repeat (3000) @(posedge clk);
      for (int i = 0; i < DEPTH; i++) begin
        logic [7:0] b; b = 8'($urandom);
        rx_sum += b;
        uart_send(b);
      end
    end
    begin
      repeat (500) @(posedge clk);
      ext_irq[3] = 1; @(posedge clk); ext_irq[3] = 0;        // masked
      repeat (700) @(posedge clk);
      ext_irq[6] = 1; @(posedge clk); ext_irq[6] = 0;        // enabled
    end
  join_none
  wait (led == 8'hFF);
  repeat (12 * DIV) @(posedge clk);

  // ---------------- checks ----------------
  `CHECK_EQ(dut.u_dmem.mem[(RES - DMEM) / 4], 32'(SWV), "switch value read by software")
  `CHECK_EQ(dut.u_dmem.mem[(RES - DMEM) / 4 + 1], dv / ds, "div")
  `CHECK_EQ(dut.u_dmem.mem[(RES - DMEM) / 4 + 2], dv % ds, "rem")
  `CHECK_EQ(dut.u_dmem.mem[(CNT - DMEM) / 4 + 1], 32'd1, "receive buffer full interrupt once")
  `CHECK_EQ(dut.u_dmem.mem[(CNT - DMEM) / 4 + 2] >= 1, 1'b1, "transmit buffer empty interrupt")
  `CHECK_EQ(dut.u_dmem.mem[(CNT - DMEM) / 4 + 3], 32'd0, "masked irq3 not taken")
  `CHECK_EQ(dut.u_dmem.mem[(CNT - DMEM) / 4 + 4], 32'd1, "software interrupt once")
  `CHECK_EQ(dut.u_dmem.mem[(CNT - DMEM) / 4 + 6], 32'd1, "external irq6 once")
  `CHECK_EQ(dut.u_dmem.mem[(CNT - DMEM) / 4] >= 3, 1'b1, "timer interrupts")
  `CHECK_EQ(dut.u_dmem.mem[(RSUM - DMEM) / 4], 32'(rx_sum), "sum of received bytes")
  for (int v = 0; v < 8; v++)
    `CHECK_EQ(32'(n_vec[v]), dut.u_dmem.mem[(CNT - DMEM) / 4 + v], $sformatf("vector %0d count", v))
  `CHECK_EQ(tx_bytes.size(), 4, "four bytes sent")
  if (tx_bytes.size() == 4) `CHECK_EQ({tx_bytes[0], tx_bytes[1], tx_bytes[2], tx_bytes[3]}, "Hi!\n", "UART text")
  begin
    int hits; hits = 0;
    foreach (leds_seen[i]) if (leds_seen[i] == 8'h5A) hits++;
    `CHECK_EQ(hits, 1, "LED pattern 0x5A shown")
  end
  $display("mechanisms: acks=%0d held=%0d masked=%0d div_stall=%0d fetch=%0d dmem=%0d periph=%0d",
           n_ack, n_held, n_masked, n_div_stall, n_fetch, n_dmem, n_periph);
  checks++; if (n_held == 0)      begin failures++; $display("FAIL no request held back during service"); end
  checks++; if (n_masked == 0)    begin failures++; $display("FAIL no masked request"); end
  checks++; if (n_div_stall == 0) begin failures++; $display("FAIL no divider stall"); end
  checks++; if (n_periph == 0)    begin failures++; $display("FAIL no peripheral access"); end
  `TB_END
end
