// tb_riscv_icache: fetch sequences against a memory with two-cycle read
// latency. Checks that a miss costs three cycles and then hits, that returned
// words are correct, that two addresses of one set live together (two ways),
// that a third evicts the least recently used one, and that reset flushes.
// Reference values come from the report's two ways, 32 sets and one-word
// lines; LRU replacement is a design choice.
module tb_riscv_icache;
  logic clk = 0, rst = 1, req = 0, hit;
  logic [31:0] pc = 0, instr, mem_addr, mem_rdata, q1;
  int checks = 0, failures = 0;
  riscv_icache dut (.*);
  always #5 clk = ~clk;
  function automatic logic [31:0] content(input logic [31:0] a); return a ^ 32'hA5A5_0000; endfunction
  always_ff @(posedge clk) begin q1 <= content(mem_addr); mem_rdata <= q1; end
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // fetch: returns cycles until hit
  task automatic fetch(input logic [31:0] a, output int cyc);
    @(negedge clk); pc = a; req = 1; cyc = 0; #1;
    while (!hit) begin @(negedge clk); cyc++; #1; end
    checks++;
    if (instr !== content(a)) begin failures++; $display("FAIL data at %08h", a); end
  endtask
  task automatic expect_cyc(input int got, input int exp, input string w);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d cycles, expected %0d", w, got, exp); end
  endtask
  initial begin
    int c;
    pc = 32'h100; repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    fetch(32'h100, c); expect_cyc(c, 3, "cold miss");
    fetch(32'h100, c); expect_cyc(c, 0, "hit");
    fetch(32'h180, c); expect_cyc(c, 3, "same set, other way");   // set 0 (0x100 and 0x180 share index)
    fetch(32'h100, c); expect_cyc(c, 0, "way 0 still there");
    fetch(32'h180, c); expect_cyc(c, 0, "way 1 still there");
    fetch(32'h200, c); expect_cyc(c, 3, "third line evicts LRU");
    fetch(32'h180, c); expect_cyc(c, 0, "MRU kept");
    fetch(32'h100, c); expect_cyc(c, 3, "LRU evicted");
    for (int i = 0; i < 32; i++) begin fetch(32'h1000 + 4*i, c); expect_cyc(c, 3, "loop fill"); end
    for (int i = 0; i < 32; i++) begin fetch(32'h1000 + 4*i, c); expect_cyc(c, 0, "loop hits"); end
    pc = 32'h1000; req = 0; rst = 1; @(negedge clk); rst = 0;
    fetch(32'h1000, c); expect_cyc(c, 3, "flushed by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
