// riscv_alu: execute-stage arithmetic of the RV32IM core. The ALU part
// computes the RV32I operations and the four multiplies in one cycle (a
// 33x33-bit signed product covers mul, mulh, mulhsu and mulhu; on an FPGA it
// maps onto DSP blocks). The comparator part evaluates the branch condition
// of beq/bne/blt/bge/bltu/bgeu; jal and jalr are always taken. Division is done
// by riscv_divider; for div/rem opcodes y is zero. Fully combinational.
// From the Orca report: RV32IM ALU functions and a single-cycle multiplier.
// Own choices: one 33x33 multiply shared by the four multiply instructions.
module riscv_alu
  import riscv_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_op_e     op,
  output logic [31:0] y,
  input  logic [31:0] cmp_a,
  input  logic [31:0] cmp_b,
  input  br_op_e      br_op,
  output logic        taken
);
  logic signed [65:0] prod;
  logic        a_sgn, b_sgn;

  always_comb begin
    a_sgn = (op == ALU_MULH || op == ALU_MULHSU) && a[31];
    b_sgn = (op == ALU_MULH) && b[31];
    prod  = $signed({{33{a_sgn}}, a}) * $signed({{33{b_sgn}}, b});
    unique case (op)
      ALU_ADD:    y = a + b;
      ALU_SUB:    y = a - b;
      ALU_SLL:    y = a << b[4:0];
      ALU_SLT:    y = {31'h0, $signed(a) < $signed(b)};
      ALU_SLTU:   y = {31'h0, a < b};
      ALU_XOR:    y = a ^ b;
      ALU_SRL:    y = a >> b[4:0];
      ALU_SRA:    y = 32'($signed(a) >>> b[4:0]);
      ALU_OR:     y = a | b;
      ALU_AND:    y = a & b;
      ALU_MUL:    y = prod[31:0];
      ALU_MULH, ALU_MULHSU, ALU_MULHU: y = prod[63:32];
      default:    y = 32'h0;
    endcase
  end

  always_comb begin
    unique case (br_op)
      BR_EQ:  taken = (cmp_a == cmp_b);
      BR_NE:  taken = (cmp_a != cmp_b);
      BR_LT:  taken = ($signed(cmp_a) < $signed(cmp_b));
      BR_GE:  taken = ($signed(cmp_a) >= $signed(cmp_b));
      BR_LTU: taken = (cmp_a < cmp_b);
      BR_GEU: taken = (cmp_a >= cmp_b);
      BR_JAL, BR_JALR: taken = 1'b1;
      default: taken = 1'b0;
    endcase
  end
endmodule
