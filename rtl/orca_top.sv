// orca_top: the Orca microcomputer. A five-stage RV32IM core (riscv_core)
// runs from a 64 KiB program memory and reaches everything else through
// memory_controller on a 32-bit bus (map in orca_pkg):
//   0x00000-0x0FFFF program memory      0x10000 COUNTER   0x10004 ENTROPY
//   0x20000-0x2383F video memory        0x30000-0x3007F keyboard scancodes
//   0x30080 keyboard control            0x40000-0x40403 AES input buffer
//   0x40404-0x40807 AES output buffer   0x4F000 AES control
// All devices are polled; there are no interrupts. The text-mode video card
// runs in the pixel clock domain (74.25 MHz for 720p) and shares only the
// dual-clock video RAM with the CPU domain (50 MHz). The UART programmer
// writes program memory through its instruction port, halts/starts the core
// and resets it; it holds the core halted after power-up until an 'S'
// command. Every serial program write also resets the core so that its
// instruction cache never holds stale words. halt_sw also halts the core and each rising edge of step_btn then
// advances it by one cycle; dbg shows the pipeline state and seg_an/seg_cat
// show the value picked by dbg_view on an eight-digit seven-segment display.
// The AES key is the AES_KEY parameter. Outputs are raw RGB, syncs and data-enable for an HDMI
// transmitter, which is not part of this design.
// From the Orca report: the set of devices, the memory map, the clock rates
// and polling instead of interrupts.
// Own choices: serial program writes reset the core; the dbg port also
// brings the displayed values out directly; HDMI encoding and clock generation
// are outside.
module orca_top
  import orca_pkg::*;
#(
  parameter logic [127:0] AES_KEY       = 128'h000102030405060708090a0b0c0d0e0f,
  parameter int           CLKS_PER_BIT  = 434,
  parameter string        MEM_INIT_FILE = "",
  parameter string        FONT_FILE     = ""
) (
  input  logic        clk,        // CPU clock, 50 MHz
  input  logic        clk_pixel,  // pixel clock, 74.25 MHz
  input  logic        rst,
  input  logic        uart_rx,
  input  logic        ps2_clk,
  input  logic        ps2_data,
  input  logic        halt_sw,
  input  logic        step_btn,
  input  logic [4:0]  dbg_reg_sel,
  input  logic [2:0]  dbg_view,   // seven-segment view: 0-4 stage pcs, 5 ID instruction, 6-7 register
  output dbg_t        dbg,
  output logic [7:0]  seg_an,     // digit enables, active low
  output logic [6:0]  seg_cat,    // segments {g..a}, active low
  output logic [23:0] rgb,
  output logic        hsync,
  output logic        vsync,
  output logic        de
);
  // ---------------- reset, debug inputs ----------------
  logic [1:0] prst_sync;
  logic       rst_pixel;
  always_ff @(posedge clk_pixel) prst_sync <= {prst_sync[0], rst};
  assign rst_pixel = prst_sync[1];

  logic [2:0] btn_sync;
  logic [1:0] halt_sync;
  logic       step;
  always_ff @(posedge clk) begin
    if (rst) begin btn_sync <= '0; halt_sync <= '0; end
    else begin btn_sync <= {btn_sync[1:0], step_btn}; halt_sync <= {halt_sync[0], halt_sw}; end
  end
  assign step = btn_sync[1] && !btn_sync[2];

  // ---------------- UART programmer ----------------
  logic [7:0]  rx_byte;
  logic        rx_valid, prog_we, prog_reset, prog_halt;
  logic [31:0] prog_addr, prog_wdata;
  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (.clk, .rst, .rx(uart_rx), .data(rx_byte), .valid(rx_valid));
  uart_programmer u_prog (.clk, .rst, .rx_data(rx_byte), .rx_valid, .mem_we(prog_we),
    .mem_addr(prog_addr), .mem_wdata(prog_wdata), .core_reset(prog_reset), .halt(prog_halt));

  // ---------------- core ----------------
  logic        core_rst, core_halt;
  logic [31:0] imem_addr, imem_rdata;
  logic        dmem_re, dmem_we;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata;
  logic [3:0]  dmem_be;
  // A serial write into program memory also resets the core: the reset
  // empties the instruction cache, which would otherwise keep lines fetched
  // before the new program arrived (the cache fills even while halted).
  assign core_rst  = rst || prog_reset || prog_we;
  assign core_halt = prog_halt || halt_sync[1];

  riscv_core u_core (
    .clk, .rst(core_rst), .halt(core_halt), .step,
    .imem_addr, .imem_rdata,
    .dmem_re, .dmem_we, .dmem_addr, .dmem_be, .dmem_wdata, .dmem_rdata,
    .dbg_reg_sel, .dbg_reg_data(dbg.reg_data),
    .dbg_pc_if(dbg.pc_if), .dbg_pc_id(dbg.pc_id), .dbg_pc_ex(dbg.pc_ex),
    .dbg_pc_mem(dbg.pc_mem), .dbg_pc_wb(dbg.pc_wb), .dbg_instr_id(dbg.instr_id),
    .ev_retire(), .ev_stall_load(), .ev_stall_div(), .ev_stall_use(),
    .ev_icache_miss(), .ev_annul(), .ev_bypass()
  );
  assign dbg.halted = core_halt;

  seven_seg_debug u_seg (.clk, .rst, .view(dbg_view), .dbg, .an(seg_an), .seg(seg_cat));

  // ---------------- bus ----------------
  dev_e        dev;
  logic [13:0] dev_word;
  logic        dev_we;
  logic [3:0]  dev_be;
  logic [31:0] dev_wdata, pmem_rdata, vram_rdata, kbd_rdata, aes_rdata, counter, entropy;

  memory_controller u_bus (
    .clk, .rst, .re(dmem_re), .we(dmem_we), .addr(dmem_addr), .be(dmem_be), .wdata(dmem_wdata),
    .rdata(dmem_rdata), .dev, .dev_word, .dev_we, .dev_be, .dev_wdata,
    .pmem_rdata, .vram_rdata, .kbd_rdata, .aes_rdata, .counter, .entropy
  );

  // ---------------- program memory ----------------
  program_memory #(.WORDS(PMEM_WORDS), .INIT_FILE(MEM_INIT_FILE)) u_pmem (
    .clk,
    .a_addr(prog_we ? prog_addr[15:2] : imem_addr[15:2]), .a_we(prog_we), .a_wdata(prog_wdata),
    .a_rdata(imem_rdata),
    .b_addr(dev_word), .b_we((dev == DEV_PMEM && dev_we) ? dev_be : 4'h0), .b_wdata(dev_wdata),
    .b_rdata(pmem_rdata)
  );

  // ---------------- COUNTER / ENTROPY ----------------
  mmio_counter u_counter (.clk, .rst, .count(counter));
  mmio_entropy u_entropy (.clk, .rst, .value(entropy));

  // ---------------- keyboard ----------------
  logic [7:0] kbd_code;
  logic       kbd_valid, kbd_err, kbd_overflow;
  logic [7:0] kbd_ctrl;
  ps2_rx u_ps2 (.clk, .rst, .ps2_clk, .ps2_data, .code(kbd_code), .valid(kbd_valid), .err(kbd_err));
  ps2_bram u_kbd (.clk, .rst, .code_valid(kbd_valid), .code(kbd_code),
    .sel_buf(dev == DEV_KBD_BUF), .sel_ctrl(dev == DEV_KBD_CTRL), .we(dev_we),
    .addr(dev_word[4:0]), .rdata(kbd_rdata), .ctrl(kbd_ctrl), .overflow(kbd_overflow));

  // ---------------- AES co-processor ----------------
  logic [7:0] aes_ctrl;
  aes_coprocessor #(.KEY(AES_KEY), .WORDS(AES_WORDS)) u_aes (
    .clk, .rst, .sel_in(dev == DEV_AES_IN), .sel_out(dev == DEV_AES_OUT),
    .sel_ctrl(dev == DEV_AES_CTRL), .we(dev_we), .be(dev_be), .addr(dev_word[8:0]),
    .wdata(dev_wdata), .rdata(aes_rdata), .ctrl(aes_ctrl)
  );

  // ---------------- video ----------------
  logic [11:0] vram_b_addr;
  logic [31:0] vram_b_rdata;
  logic        frame_start;
  video_ram #(.WORDS(VRAM_WORDS)) u_vram (
    .clk_a(clk), .a_addr(dev_word[11:0]), .a_we((dev == DEV_VRAM && dev_we) ? dev_be : 4'h0),
    .a_wdata(dev_wdata), .a_rdata(vram_rdata),
    .clk_b(clk_pixel), .b_addr(vram_b_addr), .b_rdata(vram_b_rdata)
  );
  video_card #(.FONT_FILE(FONT_FILE)) u_video (
    .clk(clk_pixel), .rst(rst_pixel), .vram_addr(vram_b_addr), .vram_rdata(vram_b_rdata),
    .rgb, .hsync, .vsync, .de, .frame_start
  );
endmodule
