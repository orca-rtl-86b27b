// tb_mmio_counter: checks that the count advances exactly once every 50
// clock cycles over 1000 microseconds.
// Reference values come from the report's 50-cycle tick.
module tb_mmio_counter;
  logic clk = 0, rst = 1;
  logic [31:0] count;
  int checks = 0, failures = 0;
  mmio_counter dut (.*);
  always #10 clk = ~clk;   // 50 MHz
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int last_change, changes;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    changes = 0; last_change = 0;
    for (int c = 1; c <= 50000; c++) begin
      logic [31:0] prev;
      prev = count;
      @(negedge clk);
      if (count != prev) begin
        checks++;
        if (count !== prev + 1) begin failures++; $display("FAIL jump %0d -> %0d", prev, count); end
        if (changes > 0) begin
          checks++;
          if (c - last_change != 50) begin failures++; $display("FAIL period %0d", c - last_change); end
        end
        changes++; last_change = c;
      end
    end
    checks++;
    if (count !== 1000) begin failures++; $display("FAIL count %0d after 1 ms", count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
