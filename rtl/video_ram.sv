// video_ram: the 14 KiB text buffer, 3600 words of 32 bits, as a dual-port
// block RAM with a port in each clock domain. Port A (CPU clock) reads and
// writes with byte enables; port B (pixel clock) only reads. Each word holds
// two character cells: bits [7:0] character and [15:8] attribute of the even
// cell, bits [23:16] and [31:24] of the odd cell, so cell k's character is at
// byte 2k and its attribute at byte 2k+1. Both reads are registered (one cycle).
// The two clocks share nothing but the array, as on an FPGA block RAM.
// From the Orca report: a dual-clock block RAM of 14 KiB holding character
// and attribute bytes.
// Own choices: 32-bit CPU port with byte enables; one-cycle reads on both
// ports.
module video_ram #(
  parameter int WORDS = 3600,
  localparam int AW = $clog2(WORDS)
) (
  input  logic          clk_a,
  input  logic [AW-1:0] a_addr,
  input  logic [3:0]    a_we,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  input  logic          clk_b,
  input  logic [AW-1:0] b_addr,
  output logic [31:0]   b_rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk_a) begin
    for (int b = 0; b < 4; b++)
      if (a_we[b]) mem[a_addr][8*b +: 8] <= a_wdata[8*b +: 8];
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk_b) b_rdata <= mem[b_addr];
endmodule
