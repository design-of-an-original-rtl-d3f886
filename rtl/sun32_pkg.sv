// sun32_pkg: types and constants shared by the sun32 SoC.
//
// Holds the instruction encoding of the sun32 ISA, the ALU function codes,
// the condition-code bit positions, the AHB-Lite signal bundles and the SoC
// address map. The instruction set (mnemonics, 32 registers, r0 = 0,
// r31 = link register, a condition-code register, a 25-bit PC-relative
// branch field, an 18-bit upper-immediate and a 14-bit lower immediate)
// follows the design description; the binary layout of the fields, the
// opcode numbers and the address map are this design's own choice, since
// no encoding is published.
//
// Instruction formats (bit 31 on the left):
//   R : op[31:25] rd[24:20] rs1[19:15] rs2[14:10] 0[9:0]
//   I : op[31:25] rd[24:20] rs1[19:15] 0[14] imm14[13:0]
//   U : op[31:25] rd[24:20] 0[19:18] imm18[17:0]     (lui: rd = imm18 << 14)
//   J : op[31:25] off25[24:0]                      (target = pc + off25*4)
// Stores put the data register in the rd field.
package sun32_pkg;

  typedef enum logic [6:0] {
    OP_ADD   = 7'h00, OP_SUB   = 7'h01, OP_MULT  = 7'h02, OP_MULTU = 7'h03,
    OP_DIV   = 7'h04, OP_DIVU  = 7'h05, OP_REM   = 7'h06, OP_REMU  = 7'h07,
    OP_SLL   = 7'h08, OP_SRL   = 7'h09, OP_SRA   = 7'h0A, OP_AND   = 7'h0B,
    OP_OR    = 7'h0C, OP_XOR   = 7'h0D, OP_CMP   = 7'h0E,
    // immediate forms: bit 4 set, same low four bits
    OP_ADDI  = 7'h10, OP_SUBI  = 7'h11, OP_MULTI = 7'h12, OP_MULTUI= 7'h13,
    OP_DIVI  = 7'h14, OP_DIVUI = 7'h15, OP_REMI  = 7'h16, OP_REMUI = 7'h17,
    OP_SLLI  = 7'h18, OP_SRLI  = 7'h19, OP_SRAI  = 7'h1A, OP_ANDI  = 7'h1B,
    OP_ORI   = 7'h1C, OP_XORI  = 7'h1D, OP_CMPI  = 7'h1E,
    OP_LB    = 7'h20, OP_LBU   = 7'h21, OP_LH    = 7'h22, OP_LHU   = 7'h23,
    OP_LW    = 7'h24, OP_SB    = 7'h28, OP_SH    = 7'h29, OP_SW    = 7'h2A,
    OP_LUI   = 7'h2C,
    OP_B     = 7'h40, OP_BEQ   = 7'h41, OP_BNE   = 7'h42, OP_BGT   = 7'h43,
    OP_BLE   = 7'h44, OP_BULT  = 7'h45, OP_BULE  = 7'h46, OP_BUGT  = 7'h47,
    OP_BUGE  = 7'h48, OP_CALL  = 7'h49, OP_RET   = 7'h4A,
    OP_MSR   = 7'h60, OP_MRS   = 7'h61, OP_RETI  = 7'h62
  } opcode_e;

  // ALU functions: the low four opcode bits of the arithmetic group.
  typedef enum logic [3:0] {
    ALU_ADD = 4'h0, ALU_SUB = 4'h1, ALU_MULT = 4'h2, ALU_MULTU = 4'h3,
    ALU_DIV = 4'h4, ALU_DIVU = 4'h5, ALU_REM = 4'h6, ALU_REMU = 4'h7,
    ALU_SLL = 4'h8, ALU_SRL = 4'h9, ALU_SRA = 4'hA, ALU_AND = 4'hB,
    ALU_OR  = 4'hC, ALU_XOR = 4'hD, ALU_CMP = 4'hE, ALU_PASSB = 4'hF
  } alu_fn_e;

  // Branch conditions: the low four opcode bits of the branch group.
  typedef enum logic [3:0] {
    BR_ALWAYS = 4'h0, BR_EQ = 4'h1, BR_NE = 4'h2, BR_GT = 4'h3, BR_LE = 4'h4,
    BR_ULT = 4'h5, BR_ULE = 4'h6, BR_UGT = 4'h7, BR_UGE = 4'h8
  } br_cond_e;

  // Condition-code bits in the control status register (PSR).
  localparam int unsigned CC_Z   = 0;  // operands equal
  localparam int unsigned CC_LT  = 1;  // signed less than
  localparam int unsigned CC_ULT = 2;  // unsigned less than
  typedef logic [2:0] cc_t;

  // Control status registers reachable with msr/mrs (index in imm14).
  localparam logic [13:0] CSR_PSR = 14'd0;
  localparam logic [13:0] CSR_EPC = 14'd1;

  // Memory access sizes, numbered as AHB HSIZE.
  typedef enum logic [2:0] { SZ_BYTE = 3'd0, SZ_HALF = 3'd1, SZ_WORD = 3'd2 } size_e;

  // AHB-Lite transfer types
  localparam logic [1:0] HTRANS_IDLE   = 2'b00;
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;

  // Signals driven by the single AHB-Lite master.
  typedef struct packed {
    logic [31:0] haddr;
    logic        hwrite;
    logic [2:0]  hsize;
    logic [1:0]  htrans;
    logic [31:0] hwdata;
  } ahb_m2s_t;

  // Signals returned by a slave.
  typedef struct packed {
    logic [31:0] hrdata;
    logic        hreadyout;
    logic        hresp;
  } ahb_s2m_t;

  // Address map: slave numbers and bases.
  localparam int unsigned NUM_SLAVES = 8;
  localparam int unsigned S_IMEM = 0, S_DMEM = 1, S_INTC = 2, S_UTX = 3,
                          S_URX = 4, S_TIMER = 5, S_LED = 6, S_SW = 7;
  localparam logic [31:0] IMEM_BASE  = 32'h0000_0000;  // 64 KiB
  localparam logic [31:0] DMEM_BASE  = 32'h0001_0000;  // 64 KiB
  localparam logic [31:0] INTC_BASE  = 32'h8000_0000;
  localparam logic [31:0] UTX_BASE   = 32'h8000_1000;
  localparam logic [31:0] URX_BASE   = 32'h8000_2000;
  localparam logic [31:0] TIMER_BASE = 32'h8000_3000;
  localparam logic [31:0] LED_BASE   = 32'h8000_4000;
  localparam logic [31:0] SW_BASE    = 32'h8000_5000;
  // Decoder table, indexed by slave number: a slave is selected when
  // (HADDR & SLV_MASK) == SLV_BASE.
  localparam logic [31:0] SLV_BASE [NUM_SLAVES] = '{
    IMEM_BASE, DMEM_BASE, INTC_BASE, UTX_BASE, URX_BASE, TIMER_BASE, LED_BASE, SW_BASE
  };
  localparam logic [31:0] SLV_MASK [NUM_SLAVES] = '{
    32'hFFFF_0000, 32'hFFFF_0000, 32'hFFFF_F000, 32'hFFFF_F000,
    32'hFFFF_F000, 32'hFFFF_F000, 32'hFFFF_F000, 32'hFFFF_F000
  };

  // Reset entry point: just past the eight-entry vector table at address 0.
  localparam logic [31:0] RESET_PC = 32'h0000_0020;

endpackage
