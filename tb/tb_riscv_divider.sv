// tb_riscv_divider: random and corner-case divisions in all four modes,
// compared with SystemVerilog arithmetic and the RISC-V rules for division by
// zero and signed overflow; checks that done comes 33 cycles after the start
// edge (one load cycle and 32 iteration cycles).
// Reference values come from the RV32M specification, including divide by
// zero and overflow.
module tb_riscv_divider;
  logic clk = 0, rst = 1, start = 0, is_signed = 0, want_rem = 0, busy, done;
  logic [31:0] dividend = 0, divisor = 0, result;
  int checks = 0, failures = 0;
  riscv_divider dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic [31:0] model(input logic [31:0] x, input logic [31:0] z, input logic s, input logic r);
    if (z == 0) return r ? x : 32'hffffffff;
    if (s && x == 32'h80000000 && z == 32'hffffffff) return r ? 0 : 32'h80000000;
    if (s) return r ? 32'($signed(x) % $signed(z)) : 32'($signed(x) / $signed(z));
    return r ? x % z : x / z;
  endfunction
  initial begin
    int cyc;
    logic [31:0] vals [5] = '{32'h0, 32'h1, 32'hffffffff, 32'h80000000, 32'h7};
    repeat (2) @(posedge clk); rst <= 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      dividend = (i % 4 == 0) ? vals[$urandom % 5] : $urandom;
      divisor  = (i % 3 == 0) ? vals[$urandom % 5] : ((i % 2) ? $urandom : $urandom % 1000);
      is_signed = $urandom; want_rem = $urandom; start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (result !== model(dividend, divisor, is_signed, want_rem)) begin
        failures++; $display("FAIL %08h / %08h s=%0d r=%0d -> %08h", dividend, divisor, is_signed, want_rem, result);
      end
      checks++;
      if (cyc != 33) begin failures++; $display("FAIL latency %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
