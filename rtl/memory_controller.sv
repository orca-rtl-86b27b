// memory_controller: address decoder and read multiplexer of the 32-bit
// bus between the CPU data port and the memories and devices of the memory
// map (orca_pkg). For each access it raises exactly one device select (none
// for an unmapped address) and passes on the word index within that device,
// the byte enables and the write data. Devices answer a read one cycle later
// from a register; the controller registers the selected answer once more, so
// every read returns two cycles after the address, the latency the pipeline
// stalls for. COUNTER and ENTROPY are sampled here. Unmapped reads return 0 and
// unmapped writes are dropped.
// From the Orca report: the memory map and the 32-bit bus.
// Own choices: fixed two-cycle read latency for every device; unmapped
// accesses. dev_wdata is wdata passed through, so its bits are driven
// straight from inputs.
module memory_controller
  import orca_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // CPU side
  input  logic        re,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [3:0]  be,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  // device side
  output dev_e        dev,
  output logic [13:0] dev_word,   // word index within the device
  output logic        dev_we,
  output logic [3:0]  dev_be,
  output logic [31:0] dev_wdata,
  input  logic [31:0] pmem_rdata,
  input  logic [31:0] vram_rdata,
  input  logic [31:0] kbd_rdata,
  input  logic [31:0] aes_rdata,
  input  logic [31:0] counter,
  input  logic [31:0] entropy
);
  logic [31:0] base, cnt_q, ent_q;
  dev_e        dev_q;

  always_comb begin
    dev  = DEV_NONE;
    base = 32'h0;
    if (addr < PMEM_END)                               begin dev = DEV_PMEM; base = PMEM_BASE; end
    else if (addr[31:2] == COUNTER_ADDR[31:2])         begin dev = DEV_COUNTER; base = COUNTER_ADDR; end
    else if (addr[31:2] == ENTROPY_ADDR[31:2])         begin dev = DEV_ENTROPY; base = ENTROPY_ADDR; end
    else if (addr >= VRAM_BASE && addr < VRAM_END)     begin dev = DEV_VRAM; base = VRAM_BASE; end
    else if (addr >= KBD_BASE && addr < KBD_END)       begin dev = DEV_KBD_BUF; base = KBD_BASE; end
    else if (addr[31:2] == KBD_CTRL[31:2])             begin dev = DEV_KBD_CTRL; base = KBD_CTRL; end
    else if (addr >= AES_IN_BASE && addr < AES_IN_END) begin dev = DEV_AES_IN; base = AES_IN_BASE; end
    else if (addr >= AES_OUT_BASE && addr < AES_OUT_END) begin dev = DEV_AES_OUT; base = AES_OUT_BASE; end
    else if (addr[31:2] == AES_CTRL[31:2])             begin dev = DEV_AES_CTRL; base = AES_CTRL; end
    if (!re && !we) dev = DEV_NONE;
  end

  assign dev_word  = 14'((addr - base) >> 2);
  assign dev_we    = we && (dev != DEV_NONE);
  assign dev_be    = we ? be : 4'h0;
  assign dev_wdata = wdata;

  always_ff @(posedge clk) begin
    if (rst) begin
      dev_q <= DEV_NONE; cnt_q <= '0; ent_q <= '0; rdata <= '0;
    end else begin
      dev_q <= re ? dev : DEV_NONE;
      cnt_q <= counter;
      ent_q <= entropy;
      unique case (dev_q)
        DEV_PMEM:                            rdata <= pmem_rdata;
        DEV_COUNTER:                         rdata <= cnt_q;
        DEV_ENTROPY:                         rdata <= ent_q;
        DEV_VRAM:                            rdata <= vram_rdata;
        DEV_KBD_BUF, DEV_KBD_CTRL:           rdata <= kbd_rdata;
        DEV_AES_IN, DEV_AES_OUT, DEV_AES_CTRL: rdata <= aes_rdata;
        default:                             rdata <= 32'h0;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(re && we));
endmodule
