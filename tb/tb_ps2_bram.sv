// tb_ps2_bram: pushes scancodes, reads the control register and the buffer
// as software does, clears with a write, and fills the buffer past 127
// entries to check the overflow behaviour.
// Reference values come from the report's control register layout;
// saturation at 127 is a design choice.
module tb_ps2_bram;
  logic clk = 0, rst = 1, code_valid = 0, sel_buf = 0, sel_ctrl = 0, we = 0, overflow;
  logic [7:0] code = 0, ctrl;
  logic [4:0] addr = 0;
  logic [31:0] rdata;
  int checks = 0, failures = 0, n_ovf = 0;
  ps2_bram dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && overflow) n_ovf++;
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic push(input logic [7:0] c);
    @(negedge clk); code = c; code_valid = 1; @(negedge clk); code_valid = 0;
  endtask
  task automatic rd(input logic ctl, input int a, output logic [31:0] d);
    @(negedge clk); sel_ctrl = ctl; sel_buf = !ctl; addr = 5'(a); @(negedge clk); d = rdata; sel_ctrl = 0; sel_buf = 0;
  endtask
  task automatic chk(input logic ok, input string w);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask
  initial begin
    logic [31:0] d;
    logic [7:0] codes [5] = '{8'h1C, 8'hF0, 8'h1C, 8'h29, 8'h5A};
    repeat (2) @(posedge clk); rst = 0;
    rd(1, 0, d); chk(d === 0, "empty ctrl");
    foreach (codes[i]) push(codes[i]);
    rd(1, 0, d); chk(d === {24'h0, 7'd5, 1'b1}, "ctrl after 5");
    rd(0, 0, d); chk(d === 32'h291CF01C, "word 0");
    rd(0, 1, d); chk(d[7:0] === 8'h5A, "word 1 byte 0");
    @(negedge clk); sel_ctrl = 1; we = 1; @(negedge clk); sel_ctrl = 0; we = 0;
    rd(1, 0, d); chk(d === 0, "cleared");
    push(8'h11);
    rd(0, 0, d); chk(d[7:0] === 8'h11, "restart at 0");
    for (int i = 1; i < 130; i++) push(8'(i + 100));
    rd(1, 0, d); chk(d[7:1] === 127, "saturated count");
    chk(n_ovf === 3, "three dropped");
    rd(0, 31, d); chk(d[23:16] === 8'(126 + 100), "last kept entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
