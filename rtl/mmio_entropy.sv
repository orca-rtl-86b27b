// mmio_entropy: the ENTROPY register, a pseudo-random number source. A
// 32-bit maximal-length Galois LFSR (taps 32, 22, 2, 1; polynomial 0x80200003)
// advances every clock, so successive reads by software, which are separated
// by a data-dependent number of cycles, sample an unpredictable point of the
// sequence. Reset loads a non-zero seed. Read-only.
// From the Orca report: a random number source at 0x10004.
// Own choices: a 32-bit maximal-length Galois LFSR and its seed.
module mmio_entropy #(
  parameter logic [31:0] SEED = 32'hACE1_2468
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] value
);
  always_ff @(posedge clk) begin
    if (rst) value <= SEED;
    else     value <= {1'b0, value[31:1]} ^ (value[0] ? 32'h8020_0003 : 32'h0);
  end
endmodule
