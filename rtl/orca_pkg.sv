// orca_pkg: the physical memory map of the Orca microcomputer and the sizes
// derived from it. All addresses are byte addresses on the 32-bit bus.
// From the Orca report: the addresses and sizes of the memory map.
// Own choices: the video memory end (0x23840) and AES buffer size (0x404)
// where the map disagrees with itself.
package orca_pkg;
  localparam logic [31:0] PMEM_BASE    = 32'h0000_0000, PMEM_END    = 32'h0001_0000;
  localparam logic [31:0] COUNTER_ADDR = 32'h0001_0000;
  localparam logic [31:0] ENTROPY_ADDR = 32'h0001_0004;
  localparam logic [31:0] VRAM_BASE    = 32'h0002_0000, VRAM_END    = 32'h0002_3840;
  localparam logic [31:0] KBD_BASE     = 32'h0003_0000, KBD_END     = 32'h0003_0080;
  localparam logic [31:0] KBD_CTRL     = 32'h0003_0080;
  localparam logic [31:0] AES_IN_BASE  = 32'h0004_0000, AES_IN_END  = 32'h0004_0404;
  localparam logic [31:0] AES_OUT_BASE = 32'h0004_0404, AES_OUT_END = 32'h0004_0808;
  localparam logic [31:0] AES_CTRL     = 32'h0004_F000;

  localparam int PMEM_WORDS = 16384;  // 64 KiB
  localparam int VRAM_WORDS = 3600;   // 160 x 45 cells x 2 bytes = 14400 bytes
  localparam int KBD_WORDS  = 32;     // 128 scancode bytes
  localparam int AES_WORDS  = 257;    // 0x404 bytes per buffer

  typedef enum logic [3:0] {
    DEV_NONE, DEV_PMEM, DEV_COUNTER, DEV_ENTROPY, DEV_VRAM, DEV_KBD_BUF, DEV_KBD_CTRL,
    DEV_AES_IN, DEV_AES_OUT, DEV_AES_CTRL
  } dev_e;

  // What the halting-mode debugger shows.
  typedef struct packed {
    logic [31:0] pc_if, pc_id, pc_ex, pc_mem, pc_wb;
    logic [31:0] instr_id;
    logic [31:0] reg_data;
    logic        halted;
  } dbg_t;
endpackage
