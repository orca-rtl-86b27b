// tb_aes_key_memory: writes eleven random round keys, reads them back in a
// shuffled order, and checks that an out-of-range write changes nothing.
// Reference values come from a model array of 11 keys.
module tb_aes_key_memory;
  logic clk = 0, rst = 1, we = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [127:0] wdata = 0, rdata;
  logic [127:0] model [11];
  int checks = 0, failures = 0;
  aes_key_memory dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); rst <= 0;
    for (int i = 0; i < 11; i++) begin
      model[i] = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk); we = 1; waddr = 4'(i); wdata = model[i];
    end
    @(negedge clk); we = 1; waddr = 4'd12; wdata = '1;
    @(negedge clk); we = 0;
    for (int j = 0; j < 11; j++) begin
      raddr = 4'((j * 7) % 11); #1;
      checks++;
      if (rdata !== model[raddr]) begin failures++; $display("FAIL key %0d", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
