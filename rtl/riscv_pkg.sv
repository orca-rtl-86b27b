// riscv_pkg: types and constants shared by the RV32IM pipeline: opcodes,
// ALU and branch functions, operand and writeback selects, and the decoded
// control bundle that travels down the pipeline.
// From the Orca report: the RV32IM encodings.
// Own choices: the internal enums and control struct.
package riscv_pkg;
  typedef enum logic [6:0] {
    OP_LUI = 7'b0110111, OP_AUIPC = 7'b0010111, OP_JAL = 7'b1101111,
    OP_JALR = 7'b1100111, OP_BRANCH = 7'b1100011, OP_LOAD = 7'b0000011,
    OP_STORE = 7'b0100011, OP_IMM = 7'b0010011, OP_REG = 7'b0110011,
    OP_FENCE = 7'b0001111, OP_SYSTEM = 7'b1110011
  } opcode_e;

  typedef enum logic [4:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_SRA,
    ALU_OR, ALU_AND, ALU_MUL, ALU_MULH, ALU_MULHSU, ALU_MULHU,
    ALU_DIV, ALU_DIVU, ALU_REM, ALU_REMU
  } alu_op_e;

  typedef enum logic [3:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LT, BR_GE, BR_LTU, BR_GEU, BR_JAL, BR_JALR
  } br_op_e;

  typedef enum logic [1:0] {ASEL_RS1, ASEL_PC, ASEL_ZERO} asel_e;
  typedef enum logic       {BSEL_RS2, BSEL_IMM} bsel_e;
  typedef enum logic [1:0] {WB_ALU, WB_MEM, WB_PC4} wb_sel_e;

  typedef struct packed {
    logic        legal;
    logic [4:0]  rs1, rs2, rd;
    logic        uses_rs1, uses_rs2;
    logic [31:0] imm;
    alu_op_e     alu_op;
    br_op_e      br_op;
    asel_e       asel;
    bsel_e       bsel;
    wb_sel_e     wb_sel;
    logic        reg_we;
    logic        mem_re, mem_we;
    logic [2:0]  mem_funct3;   // LB/LH/LW/LBU/LHU, SB/SH/SW
    logic        is_div;
  } ctl_t;

  function automatic logic is_div_op(input alu_op_e op);
    return op inside {ALU_DIV, ALU_DIVU, ALU_REM, ALU_REMU};
  endfunction
endpackage
