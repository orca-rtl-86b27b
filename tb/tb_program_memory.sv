// tb_program_memory: writes through both ports (port B with byte enables),
// reads back through both, and checks port A's two-cycle and port B's
// one-cycle read latency against a model, including a run that gives port A
// a new address every cycle.
// Reference values come from a model memory; the port latencies are design
// choices matching the three-cycle fetch stall in the report.
module tb_program_memory;
  localparam int WORDS = 16384;
  logic clk = 0, a_we = 0;
  logic [13:0] a_addr = 0, b_addr = 0;
  logic [3:0] b_we = 0;
  logic [31:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [31:0] model [logic [13:0]];
  int checks = 0, failures = 0;
  program_memory dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string w);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s %08h exp %08h", w, got, exp); end
  endtask
  initial begin
    logic [13:0] addrs [64];
    for (int i = 0; i < 64; i++) begin
      addrs[i] = 14'($urandom);
      model[addrs[i]] = $urandom;
      @(negedge clk);
      if (i % 2) begin a_we = 1; a_addr = addrs[i]; a_wdata = model[addrs[i]]; b_we = 0; end
      else begin b_we = 4'hf; b_addr = addrs[i]; b_wdata = model[addrs[i]]; a_we = 0; end
    end
    @(negedge clk); a_we = 0; b_we = 4'b0101; b_addr = addrs[0]; b_wdata = 32'h11223344;
    model[addrs[0]] = {model[addrs[0]][31:24], 8'h22, model[addrs[0]][15:8], 8'h44};
    @(negedge clk); b_we = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); a_addr = addrs[i]; b_addr = addrs[63 - i];
      @(negedge clk);
      chk(b_rdata, model[addrs[63 - i]], "port B after 1 cycle");
      @(negedge clk);
      chk(a_rdata, model[addrs[i]], "port A after 2 cycles");
    end
    // port A streaming: a new address every cycle, data exactly two cycles later
    for (int i = 0; i < 66; i++) begin
      @(negedge clk); a_addr = addrs[i % 64];
      if (i >= 2) chk(a_rdata, model[addrs[i - 2]], "port A streaming");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
