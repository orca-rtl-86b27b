// tb_video_ram: writes from the CPU clock with byte enables and reads back
// through both ports, the second port on an unrelated pixel clock.
// Reference values come from a model memory in two clock domains.
module tb_video_ram;
  logic clk_a = 0, clk_b = 0;
  logic [11:0] a_addr = 0, b_addr = 0;
  logic [3:0] a_we = 0;
  logic [31:0] a_wdata = 0, a_rdata, b_rdata;
  logic [31:0] model [3600];
  int checks = 0, failures = 0;
  video_ram dut (.*);
  always #10 clk_a = ~clk_a;
  always #6.734 clk_b = ~clk_b;
  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 3600; i++) begin
      model[i] = $urandom;
      @(negedge clk_a); a_addr = 12'(i); a_we = 4'hf; a_wdata = model[i];
    end
    @(negedge clk_a); a_addr = 3599; a_we = 4'b1000; a_wdata = 32'h7700_0000;
    model[3599][31:24] = 8'h77;
    @(negedge clk_a); a_we = 0;
    for (int i = 0; i < 3600; i += 7) begin
      @(negedge clk_b); b_addr = 12'(3599 - i);
      @(negedge clk_b);
      checks++;
      if (b_rdata !== model[3599 - i]) begin failures++; $display("FAIL port B %0d", 3599 - i); end
      @(negedge clk_a); a_addr = 12'(i);
      @(negedge clk_a);
      checks++;
      if (a_rdata !== model[i]) begin failures++; $display("FAIL port A %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
