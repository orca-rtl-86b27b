// tb_uart_programmer: feeds command bytes and checks the write strobe,
// address and data of 'W', the reset pulse of 'R', the halt level of 'H' and
// 'S', and that unknown bytes are ignored.
// Reference values come from the report's four commands; their byte
// encoding is a design choice.
module tb_uart_programmer;
  logic clk = 0, rst = 1, rx_valid = 0, mem_we, core_reset, halt;
  logic [7:0] rx_data = 0;
  logic [31:0] mem_addr, mem_wdata;
  int checks = 0, failures = 0, n_we = 0, n_rst = 0;
  logic [31:0] last_addr, last_data;
  uart_programmer dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (!rst) begin
    if (mem_we) begin n_we++; last_addr = mem_addr; last_data = mem_wdata; end
    if (core_reset) n_rst++;
  end
  task automatic byte_in(input logic [7:0] b);
    @(negedge clk); rx_data = b; rx_valid = 1; @(negedge clk); rx_valid = 0; repeat (3) @(negedge clk);
  endtask
  task automatic chk(input logic ok, input string w);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask
  task automatic write_word(input logic [31:0] a, input logic [31:0] d);
    byte_in(8'h57);
    for (int i = 0; i < 4; i++) byte_in(a[8*i +: 8]);
    for (int i = 0; i < 4; i++) byte_in(d[8*i +: 8]);
  endtask
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    chk(halt, "halted after reset");
    write_word(32'h0000_1234, 32'hDEAD_BEEF);
    chk(n_we === 1 && last_addr === 32'h1234 && last_data === 32'hDEADBEEF, "write 1");
    byte_in(8'h00); byte_in(8'h99);
    chk(n_we === 1 && n_rst === 0, "unknown bytes ignored");
    write_word(32'h0000_FFFC, 32'h0102_0304);
    chk(n_we === 2 && last_addr === 32'hFFFC && last_data === 32'h01020304, "write 2");
    byte_in(8'h53); chk(!halt, "start");
    byte_in(8'h48); chk(halt, "halt");
    byte_in(8'h52); chk(n_rst === 1, "reset pulse");
    byte_in(8'h53); chk(!halt && n_we === 2, "start again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
