// riscv_regfile: the 32 x 32-bit integer register file. Two combinational
// read ports for the ID stage, a third combinational port for the halting-mode
// debugger, and one write port used by the WB stage on the rising edge. x0
// always reads zero. A write and a read of the same register in one cycle
// return the old value; the pipeline covers that case with its WB-to-ID
// bypass. Reset clears all registers (the programmer's reset command).
// From the Orca report: 32 registers, x0 zero, register view for debugging.
// Own choices: a third read port for the debug view; reset to zero.
module riscv_regfile (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  input  logic [4:0]  ra3,
  output logic [31:0] rd1,
  output logic [31:0] rd2,
  output logic [31:0] rd3,
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [31:0] wd
);
  logic [31:0] regs [32];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == 5'd0) ? 32'h0 : regs[ra1];
  assign rd2 = (ra2 == 5'd0) ? 32'h0 : regs[ra2];
  assign rd3 = (ra3 == 5'd0) ? 32'h0 : regs[ra3];
endmodule
