// ps2_bram: the keyboard scancode buffer (128 bytes, 32 words) and the
// KEYBOARD_CTRL_REGISTER. Each scancode from ps2_rx is stored at byte index
// count and count increments; the control register reads as
// {count[6:0], count != 0}. Software polls the register, reads bytes 0 to
// count-1 of the buffer and then writes the register (any value, normally 0),
// which sets count back to 0. With 127 scancodes pending the buffer is full
// and further scancodes are dropped (overflow is counted on the overflow
// strobe). A scancode that arrives in the same cycle as the clearing write is
// kept as the first entry. CPU reads are registered (one cycle).
// From the Orca report: the scancode buffer at 0x30000, the control
// register with available flag and count, clearing by writing 0.
// Own choices: any control write clears; the count saturates at 127 and
// later codes are dropped.
module ps2_bram (
  input  logic        clk,
  input  logic        rst,
  input  logic        code_valid,
  input  logic [7:0]  code,
  input  logic        sel_buf,
  input  logic        sel_ctrl,
  input  logic        we,
  input  logic [4:0]  addr,
  output logic [31:0] rdata,
  output logic [7:0]  ctrl,
  output logic        overflow
);
  logic [31:0] mem [32];
  logic [6:0]  count, widx;
  logic        clear, accept;

  assign clear    = sel_ctrl && we;
  assign widx     = clear ? 7'd0 : count;
  assign accept   = code_valid && (clear || count != 7'd127);
  assign overflow = code_valid && !accept;
  assign ctrl     = {count, count != 7'd0};

  always_ff @(posedge clk) begin
    if (accept) mem[widx[6:2]][8*widx[1:0] +: 8] <= code;
    rdata <= sel_ctrl ? {24'h0, ctrl} : (sel_buf ? mem[addr] : 32'h0);
  end

  always_ff @(posedge clk) begin
    if (rst)         count <= '0;
    else if (clear)  count <= accept ? 7'd1 : 7'd0;
    else if (accept) count <= count + 7'd1;
  end
endmodule
