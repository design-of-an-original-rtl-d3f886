// tb_core: runs self-generated sun32 programs on the core attached to a
// behavioural AHB-Lite memory (128 KiB, zero wait states) and a
// behavioural interrupt source, and checks:
//  - every register and immediate ALU instruction on random operands,
//  - div/divu/rem/remu, lui and the ldh/ldl constant pair,
//  - byte/halfword/word loads (signed and unsigned) and stores,
//  - every conditional branch after cmp, taken and not taken,
//  - call/ret (r31), msr/mrs of PSR and EPC,
//  - an interrupt: ack, vector taken in the next cycle, vector-table
//    lookup, EPC, reti with eoi, and resumption of the interrupted loop,
//  - the cycle counts: 5 clocks for an ALU instruction, 7 for a load.
// Results are stored by the program to memory and compared with values the
// testbench computes itself.
module tb_core;
  import sun32_pkg::*;
  `include "tb_check.svh"
  `include "sun32_asm.svh"

  logic clk = 0, rst_n = 0;
  ahb_m2s_t m;
  logic hready, hresp, intr = 0, ack, eoi;
  logic [31:0] hrdata;
  logic [2:0] vector = 0;
  logic [31:0] mem [32768];

  core dut (.*);
  always #5 clk = ~clk;

  // behavioural memory slave
  logic dph, dph_w; logic [31:0] dph_a; logic [2:0] dph_s;
  assign hready = 1'b1;
  assign hresp  = 1'b0;
  assign hrdata = mem[dph_a[16:2]];
  always_ff @(posedge clk) begin
    if (!rst_n) dph <= 0;
    else begin
      if (dph && dph_w) begin
        for (int k = 0; k < 4; k++)
          if ((dph_s == 0 && k == dph_a[1:0]) || (dph_s == 1 && k[1] == dph_a[1]) || dph_s == 2)
            mem[dph_a[16:2]][8*k +: 8] <= m.hwdata[8*k +: 8];
      end
      dph <= m.htrans[1]; dph_w <= m.hwrite; dph_a <= m.haddr; dph_s <= m.hsize;
    end
  end

  // ---------------- expected values ----------------
  localparam logic [31:0] RES = 32'h0001_0000;   // result area
  logic [31:0] expv [2048];
  int nres = 0;
  // r10 holds RES; store r with the next result slot
  function automatic void store_res(logic [4:0] r, logic [31:0] e);
    emit(enc_i(7'h2A, r, 5'd10, 14'(nres * 4)));   // sw r, nres*4(r10)
    expv[nres] = e;
    nres++;
  endfunction

  function automatic logic [31:0] alu_ref(int f, logic [31:0] a, logic [31:0] b);
    case (f)
      0: return a + b;           1: return a - b;
      2, 3: return a * b;
      4: return (b == 0) ? '1 : (a == 32'h8000_0000 && b == '1) ? a : 32'($signed(a) / $signed(b));
      5: return (b == 0) ? '1 : a / b;
      6: return (b == 0) ? a : (a == 32'h8000_0000 && b == '1) ? 0 : 32'($signed(a) % $signed(b));
      7: return (b == 0) ? a : a % b;
      8: return a << b[4:0];     9: return a >> b[4:0];
      10: return 32'($signed(a) >>> b[4:0]);
      11: return a & b;          12: return a | b;    13: return a ^ b;
      default: return 0;
    endcase
  endfunction

  int handler_at, loop_at, n_ack = 0, n_eoi = 0, vec_ok = 0;
  logic [31:0] fetch_t [$];
  int fetch_cycle [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && m.htrans[1] && !m.hwrite && m.haddr >= 32'h20 && m.haddr < 32'h40) fetch_cycle.push_back(cyc);
    if (ack) n_ack++;
    if (eoi) n_eoi++;
  end

  // interrupt source: raises int, answers ack with a vector one cycle later
  initial begin
    wait (rst_n);
    wait (dut.u_ifu.pc == 32'(loop_at * 4));
    repeat (20) @(posedge clk);
    @(negedge clk); intr = 1;
    @(posedge ack);
    @(negedge clk); intr = 0; vector = 3'd5;
  end

  initial begin
    logic [31:0] a, b, v;
    int skip_at, t;
    for (int i = 0; i < 32768; i++) mem[i] = 0;
    // vector table: entry 5 points at the handler (filled in below)
    at = 8;                                            // reset entry 0x20
    // timing probe: 3 ALU instructions then a load at 0x20..0x2C
    emit(enc_i(7'h10, 5'd1, 5'd0, 14'd1));             // addi r1, r0, 1
    emit(enc_i(7'h10, 5'd1, 5'd1, 14'd1));             // addi r1, r1, 1
    emit(enc_i(7'h24, 5'd2, 5'd0, 14'd0));             // lw r2, 0(r0)
    emit(enc_i(7'h10, 5'd1, 5'd1, 14'd1));             // addi r1, r1, 1
    li(5'd10, RES);
    store_res(5'd1, 3);
    // ALU register forms
    for (int f = 0; f < 14; f++) begin
      for (int k = 0; k < 4; k++) begin
        a = $urandom; b = (k == 0) ? 32'd0 : (k == 1) ? 32'(5 + $urandom % 40) : $urandom;
        if (f == 4 && k == 1) begin a = 32'h8000_0000; b = '1; end
        li(5'd1, a); li(5'd2, b);
        emit(enc_r(7'(f), 5'd3, 5'd1, 5'd2));
        store_res(5'd3, alu_ref(f, a, b));
      end
    end
    // ALU immediate forms
    for (int f = 0; f < 14; f++) begin
      for (int k = 0; k < 3; k++) begin
        logic [13:0] imm; logic [31:0] bx;
        a = $urandom; imm = 14'($urandom);
        bx = (f inside {8, 9, 10, 11, 12, 13}) ? {18'd0, imm} : {{18{imm[13]}}, imm};
        li(5'd1, a);
        emit(enc_i(7'h10 | 7'(f), 5'd3, 5'd1, imm));
        store_res(5'd3, alu_ref(f, a, bx));
      end
    end
    // r0 stays zero
    emit(enc_i(7'h10, 5'd0, 5'd0, 14'd55));
    store_res(5'd0, 0);
    // loads and stores: word at RES+0x1000
    v = 32'h89AB_CDEF;
    li(5'd11, RES + 32'h1000);
    li(5'd1, v);
    emit(enc_i(7'h2A, 5'd1, 5'd11, 14'd0));            // sw r1, 0(r11)
    emit(enc_i(7'h20, 5'd3, 5'd11, 14'd1)); store_res(5'd3, 32'hFFFF_FFCD);  // lb
    emit(enc_i(7'h21, 5'd3, 5'd11, 14'd3)); store_res(5'd3, 32'h0000_0089);  // lbu
    emit(enc_i(7'h22, 5'd3, 5'd11, 14'd2)); store_res(5'd3, 32'hFFFF_89AB);  // lh
    emit(enc_i(7'h23, 5'd3, 5'd11, 14'd0)); store_res(5'd3, 32'h0000_CDEF);  // lhu
    li(5'd2, 32'h1234_5677);
    emit(enc_i(7'h28, 5'd2, 5'd11, 14'd2));            // sb r2, 2(r11)
    emit(enc_i(7'h29, 5'd2, 5'd11, 14'd4));            // sh r2, 4(r11)
    emit(enc_i(7'h24, 5'd3, 5'd11, 14'd0)); store_res(5'd3, 32'h8977_CDEF);  // lw
    emit(enc_i(7'h24, 5'd3, 5'd11, 14'd4)); store_res(5'd3, 32'h0000_5677);  // lw
    emit(enc_i(7'h24, 5'd3, 5'd11, 14'h3FFC)); store_res(5'd3, 32'h0);       // lw -4(r11)
    // branches: r4 = 1 if taken, 2 if not
    for (int c = 0; c < 9; c++) begin
      for (int k = 0; k < 4; k++) begin
        logic tk;
        a = (k == 0) ? 32'h8000_0001 : $urandom % 4; b = (k == 1) ? a : (k == 0) ? 32'd3 : $urandom % 4;
        case (c)
          0: tk = 1;                              1: tk = a == b;
          2: tk = a != b;                         3: tk = $signed(a) > $signed(b);
          4: tk = $signed(a) <= $signed(b);       5: tk = a < b;
          6: tk = a <= b;                         7: tk = a > b;
          default: tk = a >= b;
        endcase
        li(5'd1, a); li(5'd2, b);
        emit(enc_i(7'h10, 5'd4, 5'd0, 14'd1));
        emit(enc_r(7'h0E, 5'd0, 5'd1, 5'd2));     // cmp r1, r2
        br(7'h40 | 7'(c), at + 2);
        emit(enc_i(7'h10, 5'd4, 5'd0, 14'd2));
        store_res(5'd4, tk ? 1 : 2);
      end
    end
    // backward branch: count down loop
    emit(enc_i(7'h10, 5'd5, 5'd0, 14'd7));             // r5 = 7
    emit(enc_i(7'h10, 5'd6, 5'd0, 14'd0));             // r6 = 0
    t = at;
    emit(enc_i(7'h10, 5'd6, 5'd6, 14'd3));             // r6 += 3
    emit(enc_i(7'h11, 5'd5, 5'd5, 14'd1));             // r5 -= 1
    emit(enc_i(7'h1E, 5'd0, 5'd5, 14'd0));             // cmpi r5, 0
    br(7'h42, t);                                      // bne
    store_res(5'd6, 21);
    // call / ret
    skip_at = at;
    br(7'h49, at + 3);                                 // call sub
    store_res(5'd7, 77);
    br(7'h40, at + 3);                                 // b over sub
    emit(enc_i(7'h10, 5'd7, 5'd0, 14'd77));            // sub: r7 = 77
    emit(enc_j(7'h4A, 0));                             // ret
    store_res(5'd31, 32'((skip_at + 1) * 4));
    // msr / mrs of PSR
    emit(enc_i(7'h10, 5'd1, 5'd0, 14'd5));
    emit(enc_i(7'h60, 5'd0, 5'd1, 14'd0));             // msr psr, r1
    emit(enc_i(7'h61, 5'd8, 5'd0, 14'd0));             // mrs r8, psr
    store_res(5'd8, 5);
    // interrupt: wait in a loop until the handler sets r20
    emit(enc_i(7'h10, 5'd20, 5'd0, 14'd0));
    loop_at = at;
    emit(enc_i(7'h1E, 5'd0, 5'd20, 14'd0));            // cmpi r20, 0
    br(7'h41, loop_at);                                // beq loop
    store_res(5'd20, 1);
    store_res(5'd21, 32'hFFFF_FFFF);                   // EPC seen in the handler (checked below)
    // done marker
    li(5'd1, 32'h0001_FFFC);
    emit(enc_i(7'h2A, 5'd1, 5'd1, 14'd0));
    t = at;
    br(7'h40, t);                                      // spin
    // handler
    handler_at = at;
    emit(enc_i(7'h10, 5'd20, 5'd20, 14'd1));           // r20++
    emit(enc_i(7'h61, 5'd21, 5'd0, 14'd1));            // mrs r21, epc
    emit(enc_j(7'h62, 0));                             // reti
    prog[5] = 32'(handler_at * 4);
    for (int i = 0; i < at; i++) mem[i] = prog[i];

    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      wait (mem[32'h1FFFC >> 2] == 32'h0001_FFFC);
      begin repeat (400000) @(posedge clk); end
    join_any
    repeat (5) @(posedge clk);
    // EPC must be an instruction of the wait loop
    v = mem[(RES >> 2) + nres - 1];
    checks++;
    if (v != 32'(loop_at * 4) && v != 32'((loop_at + 1) * 4)) begin
      failures++; $display("FAIL EPC %h", v);
    end
    expv[nres - 1] = v;
    for (int i = 0; i < nres; i++) `CHECK_EQ(mem[(RES >> 2) + i], expv[i], $sformatf("result %0d", i))
    `CHECK_EQ(n_ack, 1, "one ack")
    `CHECK_EQ(n_eoi, 1, "one eoi")
    `CHECK_EQ(fetch_cycle.size() >= 4, 1'b1, "probe fetches seen")
    if (fetch_cycle.size() >= 4) begin
      `CHECK_EQ(fetch_cycle[1] - fetch_cycle[0], 5, "ALU instruction takes 5 clocks")
      `CHECK_EQ(fetch_cycle[2] - fetch_cycle[1], 5, "ALU instruction takes 5 clocks")
      `CHECK_EQ(fetch_cycle[3] - fetch_cycle[2], 7, "load takes 7 clocks")
    end
    `TB_END
  end
  initial begin repeat (500000) @(posedge clk); failures++; `TB_END end
endmodule
