// tb_rv_asm_pkg: a small RV32IM instruction encoder for building test
// programs inside testbenches (no external toolchain is needed).
// Based on the RV32IM instruction formats.
package tb_rv_asm_pkg;
  function automatic logic [31:0] r_type(input logic [6:0] f7, input int rs2, input int rs1,
                                         input logic [2:0] f3, input int rd, input logic [6:0] op);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] i_type(input int imm, input int rs1, input logic [2:0] f3,
                                         input int rd, input logic [6:0] op);
    return {12'(imm), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] s_type(input int imm, input int rs2, input int rs1, input logic [2:0] f3);
    logic [11:0] i; i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), f3, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_type(input int off, input int rs2, input int rs1, input logic [2:0] f3);
    logic [12:0] i; i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), f3, i[4:1], i[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] addi(input int rd, input int rs1, input int imm);
    return i_type(imm, rs1, 3'd0, rd, 7'b0010011); endfunction
  function automatic logic [31:0] add (input int rd, input int a, input int b); return r_type(7'h00, b, a, 3'd0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sub (input int rd, input int a, input int b); return r_type(7'h20, b, a, 3'd0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] mul (input int rd, input int a, input int b); return r_type(7'h01, b, a, 3'd0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] mulh(input int rd, input int a, input int b); return r_type(7'h01, b, a, 3'd1, rd, 7'b0110011); endfunction
  function automatic logic [31:0] mulhu(input int rd, input int a, input int b); return r_type(7'h01, b, a, 3'd3, rd, 7'b0110011); endfunction
  function automatic logic [31:0] div (input int rd, input int a, input int b); return r_type(7'h01, b, a, 3'd4, rd, 7'b0110011); endfunction
  function automatic logic [31:0] divu(input int rd, input int a, input int b); return r_type(7'h01, b, a, 3'd5, rd, 7'b0110011); endfunction
  function automatic logic [31:0] rem (input int rd, input int a, input int b); return r_type(7'h01, b, a, 3'd6, rd, 7'b0110011); endfunction
  function automatic logic [31:0] xor_(input int rd, input int a, input int b); return r_type(7'h00, b, a, 3'd4, rd, 7'b0110011); endfunction
  function automatic logic [31:0] slli(input int rd, input int a, input int sh); return i_type(sh, a, 3'd1, rd, 7'b0010011); endfunction
  function automatic logic [31:0] srli(input int rd, input int a, input int sh); return i_type(sh, a, 3'd5, rd, 7'b0010011); endfunction
  function automatic logic [31:0] andi(input int rd, input int a, input int imm); return i_type(imm, a, 3'd7, rd, 7'b0010011); endfunction
  function automatic logic [31:0] lw (input int rd, input int rs1, input int off); return i_type(off, rs1, 3'd2, rd, 7'b0000011); endfunction
  function automatic logic [31:0] lb (input int rd, input int rs1, input int off); return i_type(off, rs1, 3'd0, rd, 7'b0000011); endfunction
  function automatic logic [31:0] lbu(input int rd, input int rs1, input int off); return i_type(off, rs1, 3'd4, rd, 7'b0000011); endfunction
  function automatic logic [31:0] sw (input int rs2, input int rs1, input int off); return s_type(off, rs2, rs1, 3'd2); endfunction
  function automatic logic [31:0] sb (input int rs2, input int rs1, input int off); return s_type(off, rs2, rs1, 3'd0); endfunction
  function automatic logic [31:0] beq(input int a, input int b, input int off); return b_type(off, b, a, 3'd0); endfunction
  function automatic logic [31:0] bne(input int a, input int b, input int off); return b_type(off, b, a, 3'd1); endfunction
  function automatic logic [31:0] blt(input int a, input int b, input int off); return b_type(off, b, a, 3'd4); endfunction
  function automatic logic [31:0] lui(input int rd, input int imm20); return {20'(imm20), 5'(rd), 7'b0110111}; endfunction
  function automatic logic [31:0] jal(input int rd, input int off);
    logic [20:0] i; i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'b1101111};
  endfunction
  function automatic logic [31:0] jalr(input int rd, input int rs1, input int off); return i_type(off, rs1, 3'd0, rd, 7'b1100111); endfunction
  function automatic logic [31:0] nop(); return addi(0, 0, 0); endfunction
endpackage
