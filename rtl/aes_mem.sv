// aes_mem: the two AES buffers of the memory map, each WORDS 32-bit words
// (0x404 bytes by default: 64 blocks of four words plus one word for the
// terminator). The input buffer is written by the CPU (byte enables) and read
// by the co-processor; the output buffer is written by the co-processor and
// read by the CPU. Every read port is synchronous with one cycle of latency, as
// for FPGA block RAM. Contents are not reset.
// From the Orca report: two 0x404-byte buffers (input, output).
// Own choices: one-cycle synchronous reads; separate co-processor ports.
module aes_mem #(
  parameter int WORDS = 257,
  localparam int AW = $clog2(WORDS)
) (
  input  logic          clk,
  // CPU side
  input  logic          cpu_in_we,
  input  logic [3:0]    cpu_be,
  input  logic [AW-1:0] cpu_addr,
  input  logic [31:0]   cpu_wdata,
  output logic [31:0]   cpu_in_rdata,
  output logic [31:0]   cpu_out_rdata,
  // co-processor side
  input  logic [AW-1:0] cop_raddr,
  output logic [31:0]   cop_rdata,
  input  logic          cop_we,
  input  logic [AW-1:0] cop_waddr,
  input  logic [31:0]   cop_wdata
);
  logic [31:0] in_buf  [WORDS];
  logic [31:0] out_buf [WORDS];

  always_ff @(posedge clk) begin
    if (cpu_in_we && cpu_addr < AW'(WORDS))
      for (int b = 0; b < 4; b++)
        if (cpu_be[b]) in_buf[cpu_addr][8*b +: 8] <= cpu_wdata[8*b +: 8];
    cpu_in_rdata  <= in_buf[cpu_addr];
    cpu_out_rdata <= out_buf[cpu_addr];
    cop_rdata     <= in_buf[cop_raddr];
    if (cop_we && cop_waddr < AW'(WORDS)) out_buf[cop_waddr] <= cop_wdata;
  end
endmodule
