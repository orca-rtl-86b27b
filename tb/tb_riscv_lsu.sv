// tb_riscv_lsu: every size and alignment of store and load, compared with
// byte-lane arithmetic done here.
// Reference values come from the RV32I load/store rules for aligned
// accesses.
module tb_riscv_lsu;
  logic [31:0] addr, store_data, wdata, rdata, load_data;
  logic [2:0] funct3;
  logic [3:0] be;
  int checks = 0, failures = 0;
  riscv_lsu dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] mem, exp;
    logic [7:0] bt; logic [15:0] hw;
    for (int i = 0; i < 300; i++) begin
      store_data = $urandom; rdata = $urandom; mem = rdata;
      funct3 = 3'($urandom % 6); if (funct3 == 3) funct3 = 2;
      addr = {$urandom, 2'b00};
      if (funct3[1:0] == 2'd0) addr[1:0] = 2'($urandom);
      if (funct3[1:0] == 2'd1) addr[1] = 1'($urandom);
      #1;
      // store: apply be/wdata to mem and compare with the expected merge
      exp = rdata;
      case (funct3[1:0])
        2'd0: exp[8*addr[1:0] +: 8] = store_data[7:0];
        2'd1: exp[16*addr[1] +: 16] = store_data[15:0];
        default: exp = store_data;
      endcase
      for (int b = 0; b < 4; b++) if (be[b]) mem[8*b +: 8] = wdata[8*b +: 8];
      checks++;
      if (mem !== exp) begin failures++; $display("FAIL store f3=%0d a=%0d", funct3, addr[1:0]); end
      // load
      bt = rdata >> (8*addr[1:0]); hw = rdata >> (16*addr[1]);
      case (funct3)
        3'd0: exp = 32'(signed'(bt));
        3'd1: exp = 32'(signed'(hw));
        3'd4: exp = {24'h0, bt};
        3'd5: exp = {16'h0, hw};
        default: exp = rdata;
      endcase
      checks++;
      if (load_data !== exp) begin failures++; $display("FAIL load f3=%0d a=%0d", funct3, addr[1:0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
