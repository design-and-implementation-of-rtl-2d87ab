// riscv_pkg: types and constants shared by the 3-stage RV32I core and its caches.
// Holds the RV32I opcode values, the ALU operation, operand-select, bypass-select and
// writeback-select encodings, the control bundle that travels down the pipeline, and the
// cache geometry (64 lines of 64 bytes, 16 words per line, a line moved as four 128-bit beats).
// The reset PC 0x2000 and the cache geometry follow the design description; the encodings
// themselves are this implementation's own.
package riscv_pkg;

  localparam logic [31:0] RESET_PC = 32'h0000_2000;

  // RV32I major opcodes
  localparam logic [6:0] OPC_LUI    = 7'b0110111;
  localparam logic [6:0] OPC_AUIPC  = 7'b0010111;
  localparam logic [6:0] OPC_JAL    = 7'b1101111;
  localparam logic [6:0] OPC_JALR   = 7'b1100111;
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;
  localparam logic [6:0] OPC_STORE  = 7'b0100011;
  localparam logic [6:0] OPC_IMM    = 7'b0010011;
  localparam logic [6:0] OPC_REG    = 7'b0110011;
  localparam logic [6:0] OPC_SYSTEM = 7'b1110011;

  // Address of the tohost CSR (the only CSR implemented)
  localparam logic [11:0] CSR_TOHOST = 12'h51E;

  localparam logic [31:0] NOP = 32'h0000_0013;  // addi x0, x0, 0

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR,
    ALU_SRL, ALU_SRA, ALU_OR, ALU_AND, ALU_COPY_B
  } alu_op_e;

  typedef enum logic [2:0] {IMM_I, IMM_S, IMM_B, IMM_U, IMM_J} imm_sel_e;

  typedef enum logic [1:0] {OP2_RS2, OP2_IMM, OP2_ZERO} op2_sel_e;

  typedef enum logic [1:0] {BP_NONE, BP_ALU, BP_MEM} bp_sel_e;

  // Execute-stage result select (into M_ALU_OUT)
  typedef enum logic [1:0] {EX_ALU, EX_TGT, EX_PC4} ex_sel_e;

  // Memory/writeback-stage select (into the register file and memory bypass)
  typedef enum logic [1:0] {WB_EXE, WB_MEM, WB_CSR} wb_sel_e;

  typedef struct packed {
    logic      reg_we;   // writes rd (never for rd = x0)
    logic      mem_re;   // load
    logic      mem_we;   // store
    logic      branch;   // conditional branch
    logic      jal;
    logic      jalr;
    logic      csr_we;   // csrrw / csrrwi to tohost
    logic      csr_imm;  // csrrwi: operand is the 5-bit zero-extended immediate
    ex_sel_e   ex_sel;
    wb_sel_e   wb_sel;
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{reg_we: 1'b0, mem_re: 1'b0, mem_we: 1'b0, branch: 1'b0,
                                 jal: 1'b0, jalr: 1'b0, csr_we: 1'b0, csr_imm: 1'b0,
                                 ex_sel: EX_ALU, wb_sel: WB_EXE};

  // Cache geometry: word address split into tag [29:10], index [9:4], word offset [3:0]
  localparam int unsigned CACHE_LINES     = 64;
  localparam int unsigned TAG_W           = 20;

endpackage
