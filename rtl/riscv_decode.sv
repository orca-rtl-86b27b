// riscv_decode: instruction decoder of the ID stage. From the 32-bit
// instruction it produces the immediate (I, S, B, U, J formats), the source
// and destination registers and whether each source is really read (so the
// hazard logic does not stall on fields that are not registers), the ALU
// function and operand selects, the branch/jump function, the writeback select
// and register write enable, and the load/store information. fence, ecall,
// ebreak and CSR instructions decode as no-ops; unknown opcodes also decode as
// no-ops and clear legal. Combinational.
// From the Orca report: the list of decoded fields.
// Own choices: the ctl_t layout and no-op decoding of system instructions.
// The register numbers and funct3 are instruction bits passed through, so
// those output bits are driven straight from the input.
module riscv_decode
  import riscv_pkg::*;
(
  input  logic [31:0] instr,
  output ctl_t        ctl
);
  logic [6:0] opcode, funct7;
  logic [2:0] funct3;
  logic [31:0] imm_i, imm_s, imm_b, imm_u, imm_j;

  assign opcode = instr[6:0];
  assign funct3 = instr[14:12];
  assign funct7 = instr[31:25];
  assign imm_i  = {{20{instr[31]}}, instr[31:20]};
  assign imm_s  = {{20{instr[31]}}, instr[31:25], instr[11:7]};
  assign imm_b  = {{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
  assign imm_u  = {instr[31:12], 12'h0};
  assign imm_j  = {{11{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};

  function automatic alu_op_e arith(input logic [2:0] f3, input logic alt, input logic muldiv);
    if (muldiv) begin
      unique case (f3)
        3'd0: return ALU_MUL;   3'd1: return ALU_MULH;
        3'd2: return ALU_MULHSU; 3'd3: return ALU_MULHU;
        3'd4: return ALU_DIV;   3'd5: return ALU_DIVU;
        3'd6: return ALU_REM;   default: return ALU_REMU;
      endcase
    end
    unique case (f3)
      3'd0: return alt ? ALU_SUB : ALU_ADD;
      3'd1: return ALU_SLL;
      3'd2: return ALU_SLT;
      3'd3: return ALU_SLTU;
      3'd4: return ALU_XOR;
      3'd5: return alt ? ALU_SRA : ALU_SRL;
      3'd6: return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    ctl = '0;
    ctl.rs1 = instr[19:15];
    ctl.rs2 = instr[24:20];
    ctl.rd  = instr[11:7];
    ctl.mem_funct3 = funct3;
    ctl.alu_op = ALU_ADD;
    ctl.br_op  = BR_NONE;
    ctl.asel   = ASEL_RS1;
    ctl.bsel   = BSEL_IMM;
    ctl.wb_sel = WB_ALU;
    ctl.legal  = 1'b1;
    unique case (opcode)
      OP_LUI:   begin ctl.asel = ASEL_ZERO; ctl.imm = imm_u; ctl.reg_we = 1'b1; end
      OP_AUIPC: begin ctl.asel = ASEL_PC; ctl.imm = imm_u; ctl.reg_we = 1'b1; end
      OP_JAL:   begin ctl.asel = ASEL_PC; ctl.imm = imm_j; ctl.br_op = BR_JAL;
                      ctl.wb_sel = WB_PC4; ctl.reg_we = 1'b1; end
      OP_JALR:  begin ctl.imm = imm_i; ctl.br_op = BR_JALR; ctl.uses_rs1 = 1'b1;
                      ctl.wb_sel = WB_PC4; ctl.reg_we = 1'b1; end
      OP_BRANCH: begin
        ctl.imm = imm_b; ctl.asel = ASEL_PC; ctl.uses_rs1 = 1'b1; ctl.uses_rs2 = 1'b1;
        unique case (funct3)
          3'd0: ctl.br_op = BR_EQ;  3'd1: ctl.br_op = BR_NE;
          3'd4: ctl.br_op = BR_LT;  3'd5: ctl.br_op = BR_GE;
          3'd6: ctl.br_op = BR_LTU; 3'd7: ctl.br_op = BR_GEU;
          default: ctl.legal = 1'b0;
        endcase
      end
      OP_LOAD:  begin ctl.imm = imm_i; ctl.uses_rs1 = 1'b1; ctl.mem_re = 1'b1;
                      ctl.wb_sel = WB_MEM; ctl.reg_we = 1'b1; end
      OP_STORE: begin ctl.imm = imm_s; ctl.uses_rs1 = 1'b1; ctl.uses_rs2 = 1'b1;
                      ctl.mem_we = 1'b1; end
      OP_IMM:   begin ctl.imm = imm_i; ctl.uses_rs1 = 1'b1; ctl.reg_we = 1'b1;
                      ctl.alu_op = arith(funct3, funct3 == 3'd5 && funct7[5], 1'b0); end
      OP_REG:   begin ctl.bsel = BSEL_RS2; ctl.uses_rs1 = 1'b1; ctl.uses_rs2 = 1'b1;
                      ctl.reg_we = 1'b1;
                      ctl.alu_op = arith(funct3, funct7[5], funct7[0]);
                      ctl.is_div = funct7[0] && funct3[2]; end
      OP_FENCE, OP_SYSTEM: ;
      default:  ctl.legal = 1'b0;
    endcase
    if (ctl.rd == 5'd0) ctl.reg_we = 1'b0;
  end
endmodule
