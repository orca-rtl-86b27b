// tb_riscv_regfile: random writes and reads against an array model; x0 must
// stay zero; reset clears everything.
// Reference values come from a model register array.
module tb_riscv_regfile;
  logic clk = 0, rst = 1, we = 0;
  logic [4:0] ra1 = 0, ra2 = 0, ra3 = 0, wa = 0;
  logic [31:0] rd1, rd2, rd3, wd = 0;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  riscv_regfile dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 32; i++) model[i] = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 500; i++) begin
      we = $urandom; wa = $urandom; wd = $urandom;
      @(negedge clk);
      if (we && wa != 0) model[wa] = wd;
      we = 0;
      ra1 = $urandom; ra2 = $urandom; ra3 = $urandom; #1;
      checks += 3;
      if (rd1 !== model[ra1] || rd2 !== model[ra2] || rd3 !== model[ra3]) begin
        failures++; $display("FAIL read %0d %0d %0d", ra1, ra2, ra3);
      end
    end
    rst = 1; @(negedge clk); rst = 0;
    ra1 = 7; #1; checks++; if (rd1 !== 0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
