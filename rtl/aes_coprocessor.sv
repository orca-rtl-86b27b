// aes_coprocessor: memory-mapped AES-128 ECB accelerator.
// Software fills the input buffer with 16-byte blocks ended by the word
// 0xDEADBEEF and writes 1 (encrypt) or 2 (decrypt) to the control register.
// A ten-stage FSM then walks the buffer: RD_DWORD_1..4 read four words,
// START_AES starts aes_core, WAIT_FOR_AES_RESULT waits for it and
// WB_DWORD_1..4 write the result to the same offset of the output buffer. When
// the first word of a block is the terminator, or the buffer is exhausted,
// bit 2 (output available) is set and bit 3 (busy) cleared.
// Control register (read): [0] encrypt, [1] decrypt, [2] output available,
// [3] processing, [7:4] FSM stage (0..9, 10 when idle). A write starts a run
// when it sets bit 0 or bit 1 and the unit is idle; any write clears bit 2.
// Byte order: byte j of buffer word i is byte 4i+j of the AES block, so a byte
// array stored by little-endian software is processed in memory order.
// Bus side: one-cycle registered reads; the bus adds its own output stage.
// From the Orca report: buffers, control bits, the ten stage names and
// numbers, the 0xDEADBEEF terminator and polling on bit 2.
// Own choices: the key is a parameter (how software supplies it is not
// described); the idle stage value 10; the terminator is tested on the
// first word of a block; byte order; a run also ends at the end of the
// buffer.
module aes_coprocessor #(
  parameter aes_pkg::block_t KEY = 128'h000102030405060708090a0b0c0d0e0f,
  parameter int WORDS = 257,
  localparam int AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          sel_in,     // access to the input buffer
  input  logic          sel_out,    // access to the output buffer
  input  logic          sel_ctrl,   // access to the control register
  input  logic          we,
  input  logic [3:0]    be,
  input  logic [AW-1:0] addr,       // word index within a buffer
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata,      // valid one cycle after the access
  output logic [7:0]    ctrl
);
  import aes_pkg::*;
  typedef enum logic [3:0] {
    RD_DWORD_1 = 4'd0, RD_DWORD_2 = 4'd1, RD_DWORD_3 = 4'd2, RD_DWORD_4 = 4'd3,
    START_AES = 4'd4, WAIT_FOR_AES_RESULT = 4'd5,
    WB_DWORD_1 = 4'd6, WB_DWORD_2 = 4'd7, WB_DWORD_3 = 4'd8, WB_DWORD_4 = 4'd9,
    IDLE = 4'd10
  } stage_e;

  localparam logic [31:0] TERMINATOR = 32'hDEADBEEF;

  stage_e        st;
  logic          enc_flag, dec_flag, avail;
  logic [AW-1:0] ptr, cop_raddr, cop_waddr;
  logic [31:0]   cop_rdata, cop_wdata, in_rd, out_rd;
  logic [31:0]   w0, w1, w2;
  logic          cop_we;
  block_t        core_din, core_dout, result;
  logic          core_start_enc, core_start_dec, core_busy, core_done;
  logic [1:0]    rsel;

  function automatic logic [31:0] bswap(input logic [31:0] w);
    return {w[7:0], w[15:8], w[23:16], w[31:24]};
  endfunction

  aes_mem #(.WORDS(WORDS)) u_mem (
    .clk, .cpu_in_we(we && sel_in), .cpu_be(be), .cpu_addr(addr), .cpu_wdata(wdata),
    .cpu_in_rdata(in_rd), .cpu_out_rdata(out_rd),
    .cop_raddr, .cop_rdata, .cop_we, .cop_waddr, .cop_wdata
  );

  assign core_din       = {bswap(w0), bswap(w1), bswap(w2), bswap(cop_rdata)};
  assign core_start_enc = (st == START_AES) && enc_flag;
  assign core_start_dec = (st == START_AES) && dec_flag;

  aes_core u_core (.clk, .rst, .start_enc(core_start_enc), .start_dec(core_start_dec),
    .key(KEY), .din(core_din), .dout(core_dout), .busy(core_busy), .done(core_done));

  always_comb begin
    cop_raddr = ptr;
    cop_we    = 1'b0;
    cop_waddr = ptr;
    cop_wdata = '0;
    unique case (st)
      RD_DWORD_2: cop_raddr = ptr + AW'(1);
      RD_DWORD_3: cop_raddr = ptr + AW'(2);
      RD_DWORD_4: cop_raddr = ptr + AW'(3);
      WB_DWORD_1: begin cop_we = 1'b1; cop_wdata = bswap(result[127:96]); end
      WB_DWORD_2: begin cop_we = 1'b1; cop_waddr = ptr + AW'(1); cop_wdata = bswap(result[95:64]); end
      WB_DWORD_3: begin cop_we = 1'b1; cop_waddr = ptr + AW'(2); cop_wdata = bswap(result[63:32]); end
      WB_DWORD_4: begin cop_we = 1'b1; cop_waddr = ptr + AW'(3); cop_wdata = bswap(result[31:0]); end
      default: ;
    endcase
  end

  assign ctrl = {st, (st != IDLE), avail, dec_flag, enc_flag};

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= IDLE; enc_flag <= 1'b0; dec_flag <= 1'b0; avail <= 1'b0; ptr <= '0;
      w0 <= '0; w1 <= '0; w2 <= '0; result <= '0;
    end else begin
      if (sel_ctrl && we && be[0]) begin
        avail <= 1'b0;
        if (st == IDLE && (wdata[0] || wdata[1])) begin
          enc_flag <= wdata[0];
          dec_flag <= wdata[1] && !wdata[0];
          ptr      <= '0;
          st       <= RD_DWORD_1;
        end
      end
      unique case (st)
        RD_DWORD_1: st <= RD_DWORD_2;
        RD_DWORD_2: begin
          w0 <= cop_rdata;
          if (cop_rdata == TERMINATOR) begin
            st <= IDLE; avail <= 1'b1; enc_flag <= 1'b0; dec_flag <= 1'b0;
          end else st <= RD_DWORD_3;
        end
        RD_DWORD_3: begin w1 <= cop_rdata; st <= RD_DWORD_4; end
        RD_DWORD_4: begin w2 <= cop_rdata; st <= START_AES; end
        START_AES:  st <= WAIT_FOR_AES_RESULT;
        WAIT_FOR_AES_RESULT: if (core_done) begin result <= core_dout; st <= WB_DWORD_1; end
        WB_DWORD_1: st <= WB_DWORD_2;
        WB_DWORD_2: st <= WB_DWORD_3;
        WB_DWORD_3: st <= WB_DWORD_4;
        WB_DWORD_4: begin
          if (32'(ptr) + 32'd7 > 32'(WORDS - 1)) begin
            st <= IDLE; avail <= 1'b1; enc_flag <= 1'b0; dec_flag <= 1'b0;
          end else begin
            ptr <= ptr + AW'(4);
            st  <= RD_DWORD_1;
          end
        end
        default: ;
      endcase
    end
  end

  // Read data of the bus access, one cycle later.
  always_ff @(posedge clk) begin
    if (rst) rsel <= '0;
    else     rsel <= sel_ctrl ? 2'd2 : (sel_out ? 2'd1 : 2'd0);
  end
  assign rdata = (rsel == 2'd2) ? {24'h0, ctrl} : (rsel == 2'd1) ? out_rd : in_rd;

  // The AES engine only starts from START_AES and is idle elsewhere.
  assert property (@(posedge clk) disable iff (rst) core_start_enc |-> !core_busy);
endmodule
