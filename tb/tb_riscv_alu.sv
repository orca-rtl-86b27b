// tb_riscv_alu: random operands through every ALU function and branch
// condition, compared with results computed here with SystemVerilog's own
// signed/unsigned arithmetic, plus corner cases for shifts and multiplies.
// Reference values come from the RV32IM specification.
module tb_riscv_alu;
  import riscv_pkg::*;
  logic [31:0] a, b, y, cmp_a, cmp_b;
  alu_op_e op;
  br_op_e br_op;
  logic taken;
  int checks = 0, failures = 0;
  riscv_alu dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic [31:0] model(input alu_op_e o, input logic [31:0] x, input logic [31:0] z);
    longint sx, sz, ux, uz;
    sx = longint'($signed(x)); sz = longint'($signed(z)); ux = longint'(x); uz = longint'(z);
    case (o)
      ALU_ADD: return x + z;             ALU_SUB: return x - z;
      ALU_SLL: return x << z[4:0];       ALU_SLT: return (sx < sz) ? 1 : 0;
      ALU_SLTU: return (ux < uz) ? 1 : 0; ALU_XOR: return x ^ z;
      ALU_SRL: return x >> z[4:0];       ALU_SRA: return 32'(sx >>> z[4:0]);
      ALU_OR: return x | z;              ALU_AND: return x & z;
      ALU_MUL: return 32'(sx * sz);
      ALU_MULH: return 32'((sx * sz) >>> 32);
      ALU_MULHSU: return 32'((sx * uz) >>> 32);
      ALU_MULHU: return 32'((ux * uz) >> 32);
      default: return 0;
    endcase
  endfunction
  function automatic logic bmodel(input br_op_e o, input logic [31:0] x, input logic [31:0] z);
    case (o)
      BR_EQ: return x == z;  BR_NE: return x != z;
      BR_LT: return $signed(x) < $signed(z);  BR_GE: return $signed(x) >= $signed(z);
      BR_LTU: return x < z;  BR_GEU: return x >= z;
      BR_JAL, BR_JALR: return 1;
      default: return 0;
    endcase
  endfunction
  initial begin
    logic [31:0] vals [6] = '{32'h0, 32'h1, 32'hffffffff, 32'h80000000, 32'h7fffffff, 32'h12345678};
    for (int i = 0; i < 3000; i++) begin
      a = (i % 3 == 0) ? vals[$urandom % 6] : $urandom;
      b = (i % 5 == 0) ? vals[$urandom % 6] : $urandom;
      op = alu_op_e'($urandom % 14);
      cmp_a = (i % 4 == 0) ? a : $urandom; cmp_b = (i % 7 == 0) ? cmp_a : b;
      br_op = br_op_e'($urandom % 9);
      #1;
      checks++;
      if (y !== model(op, a, b)) begin failures++; $display("FAIL %s %08h %08h = %08h", op.name(), a, b, y); end
      checks++;
      if (taken !== bmodel(br_op, cmp_a, cmp_b)) begin failures++; $display("FAIL br %s", br_op.name()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
