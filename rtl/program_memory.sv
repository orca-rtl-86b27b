// program_memory: the 64 KiB general-purpose memory (instructions and data)
// as a true dual-port block RAM of 32-bit words with byte write enables.
// Port A serves instruction fetch (icache fills) and the UART programmer's
// writes; its read data has two cycles of latency (address register and output
// register). Port B is the CPU data port behind the bus; its read is
// registered once and the bus adds the second register. A write and a read of
// the same word on one port return the old word. Both ports share one clock.
// INIT_FILE, if not empty, preloads the memory with $readmemh.
// From the Orca report: 64 KiB of mixed instruction and data memory
// readable by both the fetch and data paths.
// Own choices: two-cycle port A, one-cycle port B with byte enables.
module program_memory #(
  parameter int    WORDS     = 16384,
  parameter string INIT_FILE = "",
  localparam int   AW = $clog2(WORDS)
) (
  input  logic          clk,
  // port A: instruction side
  input  logic [AW-1:0] a_addr,
  input  logic          a_we,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  // port B: data side
  input  logic [AW-1:0] b_addr,
  input  logic [3:0]    b_we,
  input  logic [31:0]   b_wdata,
  output logic [31:0]   b_rdata
);
  logic [31:0] mem [WORDS];
  logic [31:0] a_q;

  initial if (INIT_FILE != "") $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_q     <= mem[a_addr];
    a_rdata <= a_q;
  end

  always_ff @(posedge clk) begin
    for (int b = 0; b < 4; b++)
      if (b_we[b]) mem[b_addr][8*b +: 8] <= b_wdata[8*b +: 8];
    b_rdata <= mem[b_addr];
  end
endmodule
