// tb_sun32_rtos_demo: the SoC running a two-task preemptive scheduler, the
// same kind of load as the FreeRTOS demonstration sun32 was built for: two
// tasks each print their name on the UART, and the timer interrupt switches
// between them. Every SoC parameter is at its default (50 MHz, 19200 bit/s,
// 256-byte UART buffers, 16384-word memories).
//
// The program is assembled by the testbench with tb/sun32_asm.svh:
//  - the tick handler (vector 0) saves r1..r31, EPC (mrs) and PSR of the
//    running task into its task control block (TCB) in data memory, counts
//    the tick, swaps the current and next TCB pointers, and restores the
//    other task's registers, EPC and PSR (msr) before reti. It needs one
//    scratch word reachable before any register is free: r1 is parked in
//    a kernel word at byte 0x1F00 of instruction memory, addressed as
//    0x1F00(r0); the TCB pointers sit next to it.
//  - each task waits until the UART send buffer is empty, then enters a
//    critical section by masking every request in the interrupt controller
//    (IMR = 0xFF), pushes its name and a newline, and leaves it
//    (IMR = 0xFE: only the timer enabled). It then updates register-held
//    counters (r3 = iterations, r4 = 3*r3 or 5*r3) and checks them with
//    mult, divu and cmp; a mismatch, which a broken context switch would
//    cause since both tasks use the same registers, sets an error word.
// The demonstration's tick is one second; here software sets a 10 ms tick
// (TMCMP = 499,999) so that six ticks take 3 million clocks. The timer
// hardware is the same; only the value written to TMCMP differs.
//
// Checks: no error words, both tasks made progress, the UART output
// consists of whole "task1"/"task2" lines (the critical section keeps them
// from mixing) with at least three changes of task, the software tick
// count equals the taken vector-0 interrupts, no other vector was taken,
// the timer request period is exactly 500,000 clocks, and the running task
// (judged from the PC) changed at least five times.
module tb_sun32_rtos_demo;
  `include "tb_check.svh"
  `include "sun32_asm.svh"
  localparam int DIV = 50_000_000 / 19200;
  localparam int TICK = 500_000;
  localparam int NTICK = 6;
  localparam logic [31:0] DMEM  = 32'h0001_0000;
  localparam logic [31:0] TCB0  = DMEM + 32'h400;
  localparam logic [31:0] TCB1  = DMEM + 32'h500;
  localparam logic [31:0] TICKS = DMEM + 32'h300;
  localparam logic [31:0] RES1  = DMEM + 32'h600;   // task 1: count, error
  localparam logic [31:0] RES2  = DMEM + 32'h610;   // task 2: count, error
  localparam int SCR = 32'h1F00;                   // kernel words: r1, cur, next

  logic clk = 0, rst_n = 0, uart_txd, uart_rxd = 1;
  logic [7:0] led, sw = 8'h00;
  logic [7:3] ext_irq = '0;
  sun32_soc dut (.*);
  always #5 clk = ~clk;

  logic [7:0] tx_bytes [$];
  int n_vec [8];
  int n_switch = 0, n_masked_tick = 0, cur_task = 0;
  int t1_lo, t1_hi, t2_lo, t2_hi;
  longint last_tick = -1, n_cyc = 0;
  int n_tick_ok = 0, n_tick_bad = 0;

  // UART line decoder
  initial forever begin
    logic [7:0] b;
    @(negedge uart_txd);
    repeat (DIV / 2) @(posedge clk);
    for (int k = 0; k < 8; k++) begin repeat (DIV) @(posedge clk); b[k] = uart_txd; end
    repeat (DIV) @(posedge clk);
    tx_bytes.push_back(b);
  end

  always @(posedge clk) if (rst_n) begin
    int t;
    n_cyc++;
    if (dut.u_intc.ack && dut.u_intc.intr) n_vec[dut.u_intc.prio]++;
    if (dut.irq[0]) begin
      if (last_tick >= 0) begin
        if (n_cyc - last_tick == longint'(TICK)) n_tick_ok++; else n_tick_bad++;
      end
      last_tick = n_cyc;
    end
    if (dut.u_intc.irr[0] && dut.u_intc.imr[0]) n_masked_tick++;
    t = 0;
    if (dut.u_core.pc >= 32'(t1_lo) && dut.u_core.pc < 32'(t1_hi)) t = 1;
    if (dut.u_core.pc >= 32'(t2_lo) && dut.u_core.pc < 32'(t2_hi)) t = 2;
    if (t != 0 && cur_task != 0 && t != cur_task) n_switch++;
    if (t != 0) cur_task = t;
  end

  // patch a forward branch emitted at word p to jump to word target
  function automatic void patch(int p, logic [6:0] op, int target);
    prog[p] = enc_j(op, target - p);
  endfunction

  // task k: prints "task<k>\n" and checks its register counters
  function automatic int task_code(int k, logic [31:0] res);
    int start, lp, ok1, ok2, err;
    string s;
    start = at;
    s = $sformatf("task%0d\n", k);
    li(5'd10, 32'h8000_1000);                                // UART sender
    li(5'd11, 32'h8000_0000);                                // interrupt controller
    li(5'd13, res);
    emit(enc_i(7'h10, 5'd3, 5'd0, 14'd0));                   // r3 = 0
    emit(enc_i(7'h10, 5'd4, 5'd0, 14'd0));                   // r4 = 0
    emit(enc_i(7'h10, 5'd5, 5'd0, 14'(2 * k + 1)));          // r5 = 3 or 5
    lp = at;
    emit(enc_i(7'h24, 5'd1, 5'd10, 14'h4));                  // lw   r1, STATUS
    emit(enc_i(7'h1B, 5'd1, 5'd1, 14'd1));                   // andi r1, r1, 1
    emit(enc_i(7'h1E, 5'd0, 5'd1, 14'd0));                   // cmpi r1, 0
    br(7'h41, lp);                                           // beq  wait
    emit(enc_i(7'h10, 5'd1, 5'd0, 14'hFF));
    emit(enc_i(7'h2A, 5'd1, 5'd11, 14'h4));                  // IMR = 0xFF
    for (int i = 0; i < s.len(); i++) begin
      emit(enc_i(7'h10, 5'd2, 5'd0, 14'(s[i])));
      emit(enc_i(7'h2A, 5'd2, 5'd10, 14'h0));                // push byte
    end
    emit(enc_i(7'h10, 5'd1, 5'd0, 14'hFE));
    emit(enc_i(7'h2A, 5'd1, 5'd11, 14'h4));                  // IMR = 0xFE
    emit(enc_i(7'h10, 5'd3, 5'd3, 14'd1));                   // r3 += 1
    emit(enc_r(7'h00, 5'd4, 5'd4, 5'd5));                    // r4 += r5
    emit(enc_r(7'h03, 5'd6, 5'd3, 5'd5));                    // multu r6 = r3*r5
    emit(enc_r(7'h0E, 5'd0, 5'd6, 5'd4));                    // cmp r6, r4
    ok1 = at; emit(0);                                       // beq ok1
    err = at;
    emit(enc_i(7'h10, 5'd1, 5'd0, 14'd1));
    emit(enc_i(7'h2A, 5'd1, 5'd13, 14'h4));                  // error word = 1
    br(7'h40, lp);
    patch(ok1, 7'h41, at);
    emit(enc_r(7'h05, 5'd7, 5'd4, 5'd5));                    // divu r7 = r4/r5
    emit(enc_r(7'h0E, 5'd0, 5'd7, 5'd3));                    // cmp r7, r3
    ok2 = at; emit(0);                                       // beq ok2
    br(7'h40, err);
    patch(ok2, 7'h41, at);
    emit(enc_i(7'h2A, 5'd3, 5'd13, 14'h0));                  // count = r3
    br(7'h40, lp);
    return start;
  endfunction

  // tick handler: save the running task, switch TCBs, restore the other
  function automatic int tick_handler();
    int start;
    start = at;
    emit(enc_i(7'h2A, 5'd1, 5'd0, 14'(SCR)));               // sw r1, SCR(r0)
    emit(enc_i(7'h24, 5'd1, 5'd0, 14'(SCR + 4)));           // lw r1, cur
    for (int r = 2; r < 32; r++)
      emit(enc_i(7'h2A, 5'(r), 5'd1, 14'(4 * r)));          // sw rN, 4N(r1)
    emit(enc_i(7'h24, 5'd2, 5'd0, 14'(SCR)));
    emit(enc_i(7'h2A, 5'd2, 5'd1, 14'd4));                  // saved r1
    emit(enc_i(7'h61, 5'd2, 5'd0, 14'd1));                  // mrs r2, epc
    emit(enc_i(7'h2A, 5'd2, 5'd1, 14'd0));
    emit(enc_i(7'h61, 5'd2, 5'd0, 14'd0));                  // mrs r2, psr
    emit(enc_i(7'h2A, 5'd2, 5'd1, 14'd128));
    li(5'd3, TICKS);
    emit(enc_i(7'h24, 5'd4, 5'd3, 14'd0));
    emit(enc_i(7'h10, 5'd4, 5'd4, 14'd1));
    emit(enc_i(7'h2A, 5'd4, 5'd3, 14'd0));                  // ticks++
    emit(enc_i(7'h24, 5'd2, 5'd0, 14'(SCR + 8)));           // r2 = next
    emit(enc_i(7'h2A, 5'd1, 5'd0, 14'(SCR + 8)));           // next = cur
    emit(enc_i(7'h2A, 5'd2, 5'd0, 14'(SCR + 4)));           // cur = r2
    emit(enc_r(7'h0C, 5'd1, 5'd2, 5'd0));                   // or r1, r2, r0
    emit(enc_i(7'h24, 5'd2, 5'd1, 14'd0));
    emit(enc_i(7'h60, 5'd0, 5'd2, 14'd1));                  // msr epc, r2
    emit(enc_i(7'h24, 5'd2, 5'd1, 14'd128));
    emit(enc_i(7'h60, 5'd0, 5'd2, 14'd0));                  // msr psr, r2
    for (int r = 2; r < 32; r++)
      emit(enc_i(7'h24, 5'(r), 5'd1, 14'(4 * r)));          // lw rN, 4N(r1)
    emit(enc_i(7'h24, 5'd1, 5'd1, 14'd4));                  // lw r1, 4(r1)
    emit(enc_j(7'h62, 0));                                  // reti
    return start;
  endfunction

  initial begin
    int h0, hs, t1, t2, jmp;
    int lines1, lines2, changes, bad_lines, last;
    string line;
    for (int i = 0; i < 8; i++) n_vec[i] = 0;
    // ---------------- program ----------------
    at = 8;
    li(5'd10, 32'h8000_1000);
    li(5'd11, 32'h8000_0000);
    li(5'd14, 32'h8000_3000);
    emit(enc_i(7'h10, 5'd1, 5'd0, 14'd1));
    emit(enc_i(7'h2A, 5'd1, 5'd10, 14'h8));                  // UART sender EN
    emit(enc_i(7'h10, 5'd1, 5'd0, 14'hFE));
    emit(enc_i(7'h2A, 5'd1, 5'd11, 14'h4));                  // IMR = 0xFE
    li(5'd1, 32'(TICK - 1));
    emit(enc_i(7'h2A, 5'd1, 5'd14, 14'h4));                  // TMCMP
    emit(enc_i(7'h10, 5'd1, 5'd0, 14'd1));
    emit(enc_i(7'h2A, 5'd1, 5'd11, 14'h8));                  // interrupt controller EN
    emit(enc_i(7'h2A, 5'd1, 5'd14, 14'h8));                  // timer EN
    jmp = at; emit(0);                                       // b task1
    h0 = tick_handler();
    hs = at; emit(enc_j(7'h62, 0));                          // other vectors: reti
    t1 = task_code(1, RES1); t1_lo = t1 * 4; t1_hi = at * 4;
    t2 = task_code(2, RES2); t2_lo = t2 * 4; t2_hi = at * 4;
    patch(jmp, 7'h40, t1);
    prog[0] = 32'(h0 * 4);
    for (int v = 1; v < 8; v++) prog[v] = 32'(hs * 4);
    if (at >= SCR / 4) $fatal(1, "program overlaps kernel words");
    for (int i = 0; i < at; i++) dut.u_imem.mem[i] = prog[i];
    dut.u_imem.mem[SCR / 4]     = 0;
    dut.u_imem.mem[SCR / 4 + 1] = TCB0;
    dut.u_imem.mem[SCR / 4 + 2] = TCB1;
    for (int i = 0; i < 'h200; i++) dut.u_dmem.mem[i] = 0;
    dut.u_dmem.mem[(TCB1 - DMEM) / 4] = 32'(t2 * 4);         // task 2 starts at its entry

    // ---------------- run ----------------
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_vec[0] >= NTICK);
    repeat (12 * DIV) @(posedge clk);

    // ---------------- checks ----------------
    `CHECK_EQ(dut.u_dmem.mem[(RES1 - DMEM) / 4 + 1], 32'd0, "task1 register check")
    `CHECK_EQ(dut.u_dmem.mem[(RES2 - DMEM) / 4 + 1], 32'd0, "task2 register check")
    `CHECK_EQ(dut.u_dmem.mem[(RES1 - DMEM) / 4] > 3, 1'b1, "task1 progress")
    `CHECK_EQ(dut.u_dmem.mem[(RES2 - DMEM) / 4] > 3, 1'b1, "task2 progress")
    `CHECK_EQ(dut.u_dmem.mem[(TICKS - DMEM) / 4], 32'(n_vec[0]), "software tick count")
    for (int v = 1; v < 8; v++) `CHECK_EQ(n_vec[v], 0, $sformatf("vector %0d not taken", v))
    lines1 = 0; lines2 = 0; changes = 0; bad_lines = 0; last = 0; line = "";
    foreach (tx_bytes[i]) begin
      if (tx_bytes[i] == 8'h0A) begin
        if (line == "task1")      begin lines1++; if (last == 2) changes++; last = 1; end
        else if (line == "task2") begin lines2++; if (last == 1) changes++; last = 2; end
        else begin bad_lines++; $display("bad line \"%s\"", line); end
        line = "";
      end else line = {line, string'(tx_bytes[i])};
    end
    `CHECK_EQ(bad_lines, 0, "every UART line is a whole task name")
    `CHECK_EQ(lines1 > 0 && lines2 > 0, 1'b1, "both tasks printed")
    `CHECK_EQ(changes >= 3, 1'b1, "output alternates between tasks")
    `CHECK_EQ(n_tick_bad, 0, "timer request period")
    `CHECK_EQ(n_tick_ok >= NTICK - 1, 1'b1, "timer periods measured")
    $display("mechanisms: ticks=%0d task_switches=%0d lines=%0d/%0d changes=%0d ticks_held_in_critical=%0d counts=%0d/%0d",
             n_vec[0], n_switch, lines1, lines2, changes, n_masked_tick,
             dut.u_dmem.mem[(RES1 - DMEM) / 4], dut.u_dmem.mem[(RES2 - DMEM) / 4]);
    checks++; if (n_switch < 5) begin failures++; $display("FAIL too few task switches"); end
    `TB_END
  end
  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
