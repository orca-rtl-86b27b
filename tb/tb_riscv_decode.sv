// tb_riscv_decode: decodes one instruction of each format and checks the
// immediate, registers and control fields against hand-worked values.
// Reference values come from the RV32I instruction encodings.
module tb_riscv_decode;
  import riscv_pkg::*;
  import tb_rv_asm_pkg::*;
  logic [31:0] instr;
  ctl_t ctl;
  int checks = 0, failures = 0;
  riscv_decode dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic ok, input string w);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (instr %08h)", w, instr); end
  endtask
  initial begin
    instr = addi(5, 6, -3); #1;
    chk(ctl.imm === 32'hfffffffd && ctl.rd === 5 && ctl.rs1 === 6 && ctl.reg_we && ctl.alu_op === ALU_ADD && ctl.bsel === BSEL_IMM && ctl.uses_rs1 && !ctl.uses_rs2, "addi");
    instr = sub(1, 2, 3); #1;
    chk(ctl.alu_op === ALU_SUB && ctl.bsel === BSEL_RS2 && ctl.uses_rs2 && ctl.rs2 === 3, "sub");
    instr = i_type(32'h400 | 7, 4, 3'd5, 9, 7'b0010011); #1;  // srai x9, x4, 7
    chk(ctl.alu_op === ALU_SRA, "srai");
    instr = srli(9, 4, 7); #1;
    chk(ctl.alu_op === ALU_SRL, "srli");
    instr = sw(7, 8, -8); #1;
    chk(ctl.imm === 32'hfffffff8 && ctl.mem_we && !ctl.reg_we && ctl.rs2 === 7 && ctl.rs1 === 8, "sw");
    instr = lbu(3, 4, 100); #1;
    chk(ctl.mem_re && ctl.wb_sel === WB_MEM && ctl.mem_funct3 === 3'd4 && ctl.imm === 100, "lbu");
    instr = beq(1, 2, -16); #1;
    chk(ctl.br_op === BR_EQ && ctl.imm === 32'hfffffff0 && !ctl.reg_we && ctl.asel === ASEL_PC, "beq");
    instr = b_type(2048, 2, 1, 3'd7); #1;
    chk(ctl.br_op === BR_GEU && ctl.imm === 32'd2048, "bgeu");
    instr = jal(1, -1048576); #1;
    chk(ctl.br_op === BR_JAL && ctl.imm === 32'hfff00000 && ctl.wb_sel === WB_PC4 && ctl.reg_we, "jal");
    instr = jal(1, 2044); #1;
    chk(ctl.imm === 32'd2044, "jal fwd");
    instr = jalr(0, 5, 12); #1;
    chk(ctl.br_op === BR_JALR && !ctl.reg_we && ctl.uses_rs1, "jalr x0");
    instr = lui(10, 'hABCDE); #1;
    chk(ctl.imm === 32'hABCDE000 && ctl.asel === ASEL_ZERO && ctl.reg_we, "lui");
    instr = {20'h00010, 5'd10, 7'b0010111}; #1;
    chk(ctl.imm === 32'h00010000 && ctl.asel === ASEL_PC, "auipc");
    instr = divu(3, 4, 5); #1;
    chk(ctl.alu_op === ALU_DIVU && ctl.is_div, "divu");
    instr = mulhu(3, 4, 5); #1;
    chk(ctl.alu_op === ALU_MULHU && !ctl.is_div, "mulhu");
    instr = 32'h00000073; #1;   // ecall
    chk(!ctl.reg_we && !ctl.mem_we && ctl.br_op === BR_NONE && ctl.legal, "ecall as no-op");
    instr = 32'hffffffff; #1;
    chk(!ctl.legal && !ctl.reg_we, "illegal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
