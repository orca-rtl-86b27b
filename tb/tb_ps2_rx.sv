// tb_ps2_rx: a keyboard model clocks out frames (about 12 kHz clock against
// the 50 MHz system clock, shortened here to 200 system cycles per half
// period) including a key press, a release sequence (0xF0 prefix) and frames
// with a bad parity and a bad stop bit, and checks codes and error strobes.
// Reference values come from the report's frame format (start, 8 data, odd
// parity, stop).
module tb_ps2_rx;
  logic clk = 0, rst = 1, ps2_clk = 1, ps2_data = 1, valid, err;
  logic [7:0] code;
  int checks = 0, failures = 0, n_err = 0;
  logic [7:0] q [$];
  ps2_rx dut (.*);
  always #10 clk = ~clk;
  initial begin
    repeat (1000000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) begin
    if (!rst && valid) begin
      checks++;
      if (q.size() == 0 || code !== q[0]) begin failures++; $display("FAIL code %02h", code); end
      if (q.size() != 0) void'(q.pop_front());
    end
    if (!rst && err) n_err++;
  end
  task automatic frame(input logic [7:0] b, input logic good_par, input logic stop);
    logic [10:0] bits;
    bits = {stop, (~^b) ^ !good_par, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = bits[i]; repeat (100) @(posedge clk);
      ps2_clk = 0; repeat (200) @(posedge clk);
      ps2_clk = 1; repeat (100) @(posedge clk);
    end
    repeat (500) @(posedge clk);
  endtask
  initial begin
    repeat (5) @(posedge clk); rst = 0;
    q.push_back(8'h1C); frame(8'h1C, 1, 1);           // 'A' pressed
    q.push_back(8'hF0); frame(8'hF0, 1, 1);           // released
    q.push_back(8'h1C); frame(8'h1C, 1, 1);
    frame(8'h32, 0, 1);                               // parity error
    frame(8'h33, 1, 0);                               // stop bit error
    for (int i = 0; i < 8; i++) begin logic [7:0] b; b = $urandom; q.push_back(b); frame(b, 1, 1); end
    checks++; if (q.size() != 0) begin failures++; $display("FAIL %0d codes missing", q.size()); end
    checks++; if (n_err != 2) begin failures++; $display("FAIL %0d error strobes", n_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
