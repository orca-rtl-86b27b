// tb_mmio_entropy: compares the generator with a bit-serial model of the
// same LFSR and checks that values do not repeat over a long window and that
// bits are roughly balanced.
// Reference values come from a model of the same LFSR; the generator itself
// is a design choice.
module tb_mmio_entropy;
  logic clk = 0, rst = 1;
  logic [31:0] value, m;
  int checks = 0, failures = 0;
  mmio_entropy dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int ones;
    bit seen [logic [31:0]];
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    m = 32'hACE1_2468; ones = 0;
    checks++; if (value !== m) begin failures++; $display("FAIL seed"); end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // Galois step: shift right, xor taps 32,22,2,1 when the output bit is 1
      begin logic o; o = m[0]; m = m >> 1; if (o) begin m[31] ^= 1; m[21] ^= 1; m[1] ^= 1; m[0] ^= 1; end end
      checks++;
      if (value !== m) begin failures++; if (failures < 5) $display("FAIL step %0d", i); end
      if (seen.exists(value)) begin failures++; $display("FAIL repeat"); end
      seen[value] = 1;
      ones += $countones(value);
    end
    checks++;
    if (ones < 5000 * 14 || ones > 5000 * 18) begin failures++; $display("FAIL bias %0d", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
