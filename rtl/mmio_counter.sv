// mmio_counter: the COUNTER register. A prescaler divides the CPU clock by
// PRESCALE (50, so at 50 MHz the count advances every microsecond) and a
// 32-bit count increments on every prescaler wrap. Read-only; cleared by reset.
// From the Orca report: +1 every 50 cycles (1 us at 50 MHz).
// Own choices: writes are ignored; starts at 0 on reset.
module mmio_counter #(
  parameter int PRESCALE = 50
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] count
);
  logic [$clog2(PRESCALE)-1:0] pre;
  always_ff @(posedge clk) begin
    if (rst) begin
      pre <= '0; count <= '0;
    end else if (pre == $bits(pre)'(PRESCALE - 1)) begin
      pre <= '0; count <= count + 32'd1;
    end else begin
      pre <= pre + 1'b1;
    end
  end
endmodule
