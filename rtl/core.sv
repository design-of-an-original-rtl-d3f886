// core: the sun32 processor, a five-step multi-cycle implementation.
//
// Each instruction passes through up to five steps, one state of a
// controller each: instruction fetch (IF), decode and register read (ID),
// execute (EX), memory access (MEM, loads and stores only) and write back
// (WB), which also updates the PC. Fetches, loads and stores share one
// AHB-Lite master port (ahb_lite_master); with zero-wait-state memory a bus
// access takes two clocks, so an ALU or branch instruction takes 5 clocks
// and a load or store 7. div, divu, rem and remu wait in EX for the
// iterative divider (34 more clocks).
//
// Datapath: instruction_fetch_unit (PC, IR, inc32, branch target), reg32
// (32 registers, r0 = 0), alu32 with cla32, div32, condcheck, and
// memory_access_unit (byte/halfword lanes). cmp writes the condition code
// (Z, LT, ULT) into PSR bits [2:0]; the conditional branches test it.
// call writes pc + 4 into r31 and ret jumps to r31. msr/mrs move a general
// register to/from a control status register chosen by imm14: 0 = PSR,
// 1 = EPC.
//
// Interrupts: in the first cycle of IF, before the fetch starts, the core
// looks at int. If it is high the core raises ack for one cycle, takes the
// vector number that the interrupt controller presents in the following
// cycle, saves the PC of the instruction not yet executed in EPC, reads
// the handler address from the word-aligned vector table at address
// vector * 4, and continues fetching there. reti jumps back to EPC and
// raises eoi for one cycle. There is no interrupt masking in the core; the
// interrupt controller masks, prioritises and prevents nesting.
//
// The instruction list, the register conventions, the fetch-stage
// interrupt check, the ack / next-cycle vector handshake, the vector table
// at address zero, reti with end-of-interrupt, the condition-code register
// with msr/mrs, the 25/18/14-bit immediate fields and the five steps follow
// the document. The binary encoding (see sun32_pkg), the EPC register and
// its access through msr/mrs, skipping MEM for non-memory instructions,
// the divider and the reset address are this design's choices.
// Undefined opcodes execute as no-operations.
module core
  import sun32_pkg::*;
#(
  parameter logic [31:0] RESET_ADDR = RESET_PC
) (
  input  logic        clk,
  input  logic        rst_n,
  // AHB-Lite master
  output ahb_m2s_t    m,
  input  logic        hready,
  input  logic [31:0] hrdata,
  input  logic        hresp,
  // interrupt controller
  input  logic        intr,
  output logic        ack,
  output logic        eoi,
  input  logic [2:0]  vector
);
  typedef enum logic [2:0] {
    S_IF, S_IACK, S_IVEC, S_IVRD, S_ID, S_EX, S_MEM, S_WB
  } state_e;

  state_e      state;
  logic [31:0] a_q, b_q, res_q, mdr_q, epc, psr;
  logic [2:0]  vec_q;
  logic        taken_q;

  // ---------------- fetch unit ----------------
  logic [1:0]  pc_sel;
  logic [31:0] abs_target, pc, pc_plus4, rel_target, ir;
  logic        ir_we;

  // ---------------- bus master ----------------
  logic        bus_req, bus_write, bus_done, bus_err, bus_busy;
  logic [31:0] bus_addr, bus_wdata, bus_rdata;
  logic [2:0]  bus_size;

  instruction_fetch_unit #(.RESET_ADDR(RESET_ADDR)) u_ifu (
    .clk, .rst_n, .pc_sel, .abs_target, .ir_we, .ir_in(bus_rdata),
    .pc, .pc_plus4, .rel_target, .ir
  );

  ahb_lite_master u_master (
    .clk, .rst_n, .req(bus_req), .addr(bus_addr), .write(bus_write),
    .size(bus_size), .wdata(bus_wdata), .done(bus_done), .err(bus_err),
    .rdata(bus_rdata), .busy(bus_busy), .m, .hready, .hrdata, .hresp
  );

  // ---------------- decode ----------------
  opcode_e     op;
  logic [4:0]  f_rd, f_rs1, f_rs2;
  logic [13:0] imm14;
  logic [17:0] imm18;
  logic        grp_alu, is_imm, is_cmp, is_div, is_load, is_store, is_lui;
  logic        is_br, is_call, is_ret, is_msr, is_mrs, is_reti, writes_rd;
  alu_fn_e     fn;
  logic [31:0] imm_ext;
  size_e       msize;
  logic        msigned;

  assign op    = opcode_e'(ir[31:25]);
  assign f_rd  = ir[24:20];
  assign f_rs1 = ir[19:15];
  assign f_rs2 = ir[14:10];
  assign imm14 = ir[13:0];
  assign imm18 = ir[17:0];

  assign grp_alu  = (ir[31:30] == 2'b00) && (ir[28:25] != 4'hF);
  assign is_imm   = ir[29];
  assign fn       = alu_fn_e'(ir[28:25]);
  assign is_cmp   = grp_alu && fn == ALU_CMP;
  assign is_div   = grp_alu && ir[28:27] == 2'b01;        // fn 4..7
  assign is_load  = op inside {OP_LB, OP_LBU, OP_LH, OP_LHU, OP_LW};
  assign is_store = op inside {OP_SB, OP_SH, OP_SW};
  assign is_lui   = op == OP_LUI;
  assign is_br    = (ir[31:29] == 3'b100) && (ir[28:25] <= 4'h8);
  assign is_call  = op == OP_CALL;
  assign is_ret   = op == OP_RET;
  assign is_msr   = op == OP_MSR;
  assign is_mrs   = op == OP_MRS;
  assign is_reti  = op == OP_RETI;
  assign writes_rd = (grp_alu && !is_cmp) || is_load || is_lui || is_mrs;

  // logical and shift immediates are zero-extended, the others sign-extended
  assign imm_ext = (fn inside {ALU_AND, ALU_OR, ALU_XOR, ALU_SLL, ALU_SRL, ALU_SRA}
                    && grp_alu) ? {18'd0, imm14} : {{18{imm14[13]}}, imm14};

  always_comb begin
    unique case (op)
      OP_LB, OP_LBU, OP_SB: msize = SZ_BYTE;
      OP_LH, OP_LHU, OP_SH: msize = SZ_HALF;
      default:              msize = SZ_WORD;
    endcase
  end
  assign msigned = op inside {OP_LB, OP_LH};

  // ---------------- register file ----------------
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic        rf_we;

  assign ra1 = is_ret ? 5'd31 : f_rs1;
  assign ra2 = is_store ? f_rd : f_rs2;

  reg32 u_rf (.clk, .rst_n, .ra1, .ra2, .rd1, .rd2, .we(rf_we), .wa, .wd);

  // ---------------- execute ----------------
  logic [31:0] alu_b, alu_y;
  alu_fn_e     alu_fn;
  cc_t         alu_cc;
  logic        br_taken;
  logic        div_start, div_busy, div_done;
  logic [31:0] div_q, div_r;

  assign alu_fn = grp_alu ? fn : ALU_ADD;               // address add for loads/stores
  assign alu_b  = (grp_alu && !is_imm) ? b_q : imm_ext;

  alu32 u_alu (.fn(alu_fn), .a(a_q), .b(alu_b), .y(alu_y), .cc(alu_cc));

  condcheck u_cond (.cond(br_cond_e'(ir[28:25])), .cc(psr[2:0]), .taken(br_taken));

  assign div_start = (state == S_EX) && is_div && !div_busy && !div_done;

  div32 u_div (
    .clk, .rst_n, .start(div_start), .is_signed(!ir[25]), .dividend(a_q),
    .divisor(alu_b), .busy(div_busy), .done(div_done), .quotient(div_q),
    .remainder(div_r)
  );

  // ---------------- memory access ----------------
  logic [31:0] mau_wdata, load_data;
  logic [2:0]  mau_hsize;

  memory_access_unit u_mau (
    .size(msize), .is_signed(msigned), .addr_lo(res_q[1:0]), .store_data(b_q),
    .bus_rdata, .hsize(mau_hsize), .bus_wdata(mau_wdata), .load_data
  );

  // ---------------- bus request ----------------
  logic take_int;
  assign take_int = (state == S_IF) && !bus_busy && intr;

  always_comb begin
    bus_req   = 1'b0;
    bus_addr  = pc;
    bus_write = 1'b0;
    bus_size  = SZ_WORD;
    bus_wdata = mau_wdata;
    unique case (state)
      S_IF:    bus_req = !take_int;
      S_IVRD:  begin bus_req = 1'b1; bus_addr = {27'd0, vec_q, 2'b00}; end
      S_MEM:   begin
                 bus_req   = 1'b1;
                 bus_addr  = res_q;
                 bus_write = is_store;
                 bus_size  = mau_hsize;
               end
      default: ;
    endcase
  end

  // ---------------- write back / PC ----------------
  logic [31:0] csr_rd;
  assign csr_rd = (imm14 == CSR_EPC) ? epc : (imm14 == CSR_PSR) ? psr : 32'd0;

  always_comb begin
    rf_we      = 1'b0;
    wa         = f_rd;
    wd         = res_q;
    pc_sel     = 2'd0;
    abs_target = a_q;
    eoi        = 1'b0;
    ir_we      = (state == S_IF) && bus_done;
    if (state == S_IVRD && bus_done) begin
      pc_sel     = 2'd3;
      abs_target = bus_rdata;
    end
    if (state == S_WB) begin
      rf_we  = writes_rd || is_call;
      pc_sel = 2'd1;
      if (is_load) wd = mdr_q;
      if (is_call) begin
        wa     = 5'd31;
        wd     = pc_plus4;
        pc_sel = 2'd2;
      end
      if (is_br && taken_q) pc_sel = 2'd2;
      if (is_ret) pc_sel = 2'd3;
      if (is_reti) begin
        pc_sel     = 2'd3;
        abs_target = epc;
        eoi        = 1'b1;
      end
    end
  end

  assign ack = (state == S_IACK);

  // ---------------- controller ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IF;
      a_q     <= '0;
      b_q     <= '0;
      res_q   <= '0;
      mdr_q   <= '0;
      epc     <= '0;
      psr     <= '0;
      vec_q   <= '0;
      taken_q <= 1'b0;
    end else begin
      unique case (state)
        S_IF:   if (take_int) state <= S_IACK;
                else if (bus_done) state <= S_ID;
        S_IACK: state <= S_IVEC;
        S_IVEC: begin
                  vec_q <= vector;
                  epc   <= pc;
                  state <= S_IVRD;
                end
        S_IVRD: if (bus_done) state <= S_IF;
        S_ID:   begin
                  a_q   <= rd1;
                  b_q   <= rd2;
                  state <= S_EX;
                end
        S_EX:   begin
                  taken_q <= br_taken;
                  if (is_div) begin
                    if (div_done) begin
                      res_q <= ir[26] ? div_r : div_q;
                      state <= S_WB;
                    end
                  end else begin
                    res_q <= is_lui ? {imm18, 14'd0} : is_mrs ? csr_rd : alu_y;
                    if (is_cmp) psr[2:0] <= alu_cc;
                    state <= (is_load || is_store) ? S_MEM : S_WB;
                  end
                end
        S_MEM:  if (bus_done) begin
                  mdr_q <= load_data;
                  state <= S_WB;
                end
        S_WB:   begin
                  if (is_msr && imm14 == CSR_PSR) psr <= {29'd0, a_q[2:0]};
                  if (is_msr && imm14 == CSR_EPC) epc <= a_q;
                  state <= S_IF;
                end
        default: state <= S_IF;
      endcase
    end
  end

  logic unused;
  assign unused = ^{bus_err, f_rs2 & 5'd0};
endmodule
