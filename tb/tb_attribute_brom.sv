// tb_attribute_brom: checks all 256 attribute bytes against the VGA palette
// (table written out here), the 8-colour background limit and the blink bit.
// Reference values come from the VGA 16-colour palette; the attribute bit
// layout is a design choice.
module tb_attribute_brom;
  logic clk = 0;
  logic [7:0] attr = 0;
  logic [23:0] fg, bg;
  logic blink;
  int checks = 0, failures = 0;
  logic [23:0] pal [16] = '{24'h000000, 24'h0000AA, 24'h00AA00, 24'h00AAAA, 24'hAA0000, 24'hAA00AA,
                            24'hAA5500, 24'hAAAAAA, 24'h555555, 24'h5555FF, 24'h55FF55, 24'h55FFFF,
                            24'hFF5555, 24'hFF55FF, 24'hFFFF55, 24'hFFFFFF};
  attribute_brom dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); attr = 8'(i);
      @(negedge clk);
      checks++;
      if (fg !== pal[i % 16] || bg !== pal[(i / 16) % 8] || blink !== (i >= 128)) begin
        failures++; $display("FAIL attr %02h", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
