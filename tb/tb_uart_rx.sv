// tb_uart_rx: sends random bytes at the default 434 cycles per bit, with a
// 2% baud error on some, and one frame with a broken stop bit, and checks the
// received bytes.
// Reference values come from 8N1 framing at the chosen baud rate.
module tb_uart_rx;
  localparam int CPB = 434;
  logic clk = 0, rst = 1, rx = 1, valid;
  logic [7:0] data;
  int checks = 0, failures = 0, got = 0;
  logic [7:0] q [$];
  uart_rx dut (.*);
  always #10 clk = ~clk;
  initial begin
    repeat (2000000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (!rst && valid) begin
    checks++; got++;
    if (q.size() == 0 || data !== q[0]) begin failures++; $display("FAIL got %02h", data); end
    if (q.size() != 0) void'(q.pop_front());
  end
  task automatic send(input logic [7:0] b, input int cpb, input logic stop);
    rx = 0; repeat (cpb) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (cpb) @(posedge clk); end
    rx = stop; repeat (cpb) @(posedge clk);
    rx = 1; repeat (cpb) @(posedge clk);
  endtask
  initial begin
    logic [7:0] b;
    repeat (5) @(posedge clk); rst = 0; repeat (5) @(posedge clk);
    for (int i = 0; i < 20; i++) begin
      b = $urandom; q.push_back(b);
      send(b, (i % 4 == 3) ? CPB * 102 / 100 : CPB, 1);
    end
    send(8'h5A, CPB, 0);   // framing error: dropped
    b = 8'hC3; q.push_back(b); send(b, CPB, 1);
    repeat (10) @(posedge clk);
    checks++;
    if (got != 21 || q.size() != 0) begin failures++; $display("FAIL received %0d bytes", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
