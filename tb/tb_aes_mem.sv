// tb_aes_mem: fills the input buffer with byte-masked CPU writes and reads it
// through both ports; fills the output buffer from the co-processor port and
// reads it from the CPU port. Checks one-cycle read latency against a model.
// Reference values come from a model of the two buffers; one-cycle reads
// are a design choice.
module tb_aes_mem;
  localparam int WORDS = 257, AW = 9;
  logic clk = 0, cpu_in_we = 0, cop_we = 0;
  logic [3:0] cpu_be = 0;
  logic [AW-1:0] cpu_addr = 0, cop_raddr = 0, cop_waddr = 0;
  logic [31:0] cpu_wdata = 0, cop_wdata = 0, cpu_in_rdata, cpu_out_rdata, cop_rdata;
  logic [31:0] min [WORDS], mout [WORDS];
  int checks = 0, failures = 0;
  aes_mem dut (.*);
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
    for (int i = 0; i < WORDS; i++) begin
      min[i] = $urandom; mout[i] = $urandom;
      @(negedge clk); cpu_in_we = 1; cpu_be = 4'hf; cpu_addr = AW'(i); cpu_wdata = min[i];
      cop_we = 1; cop_waddr = AW'(i); cop_wdata = mout[i];
    end
    // partial write of bytes 1 and 3 of word 5
    @(negedge clk); cpu_be = 4'b1010; cpu_addr = 5; cpu_wdata = 32'hAABBCCDD; cop_we = 0;
    min[5] = {8'hAA, min[5][23:16], 8'hCC, min[5][7:0]};
    @(negedge clk); cpu_in_we = 0;
    for (int i = 0; i < WORDS; i += 3) begin
      @(negedge clk); cpu_addr = AW'(i); cop_raddr = AW'(WORDS - 1 - i);
      @(negedge clk);
      chk(cpu_in_rdata, min[i], "cpu in");
      chk(cpu_out_rdata, mout[i], "cpu out");
      chk(cop_rdata, min[WORDS - 1 - i], "cop in");
    end
    @(negedge clk); cpu_addr = 5; @(negedge clk); chk(cpu_in_rdata, min[5], "byte mask");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
