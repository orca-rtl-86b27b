// tb_font_brom: reads every address of the built-in test pattern and checks
// it and the one-cycle read latency.
// Reference values come from the test pattern used when no font file is
// given.
module tb_font_brom;
  logic clk = 0;
  logic [11:0] addr = 0;
  logic [7:0] dots;
  int checks = 0, failures = 0;
  font_brom dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] exp;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk); addr = 12'(i);
      @(negedge clk);
      exp = (i % 16 == 0 || i % 16 == 15) ? 8'h00 : 8'(i / 16);
      checks++;
      if (dots !== exp) begin failures++; $display("FAIL %03h: %02h exp %02h", i, dots, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
