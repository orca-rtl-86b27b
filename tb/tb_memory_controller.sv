// tb_memory_controller: presents an address in every region of the memory
// map (and unmapped ones) and checks the selected device, the word index, the
// write gating, and that read data comes back from the right device two
// cycles after the address.
// Reference values come from the report's memory map; the two-cycle latency
// is a design choice.
module tb_memory_controller;
  import orca_pkg::*;
  logic clk = 0, rst = 1, re = 0, we = 0;
  logic [31:0] addr = 0, wdata = 0, rdata;
  logic [3:0] be = 0;
  dev_e dev;
  logic [13:0] dev_word;
  logic dev_we;
  logic [3:0] dev_be;
  logic [31:0] dev_wdata;
  logic [31:0] pmem_rdata, vram_rdata, kbd_rdata, aes_rdata, counter, entropy;
  int checks = 0, failures = 0;
  memory_controller dut (.*);
  always #5 clk = ~clk;
  // each device answers one cycle later with a tag identifying it
  always_ff @(posedge clk) begin
    pmem_rdata <= 32'hA000_0000 | 32'(dev_word);
    vram_rdata <= 32'hB000_0000 | 32'(dev_word);
    kbd_rdata  <= 32'hC000_0000 | 32'(dev_word);
    aes_rdata  <= 32'hD000_0000 | 32'(dev_word);
  end
  assign counter = 32'h1111_1111;
  assign entropy = 32'h2222_2222;
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic probe(input logic [31:0] a, input dev_e exp_dev, input int exp_word, input logic [31:0] exp_data);
    @(negedge clk); re = 1; we = 0; addr = a; #1;
    checks++;
    if (dev !== exp_dev || (exp_dev != DEV_NONE && int'(dev_word) != exp_word)) begin
      failures++; $display("FAIL decode %08h: %s word %0d", a, dev.name(), dev_word);
    end
    @(negedge clk); re = 0; addr = 32'hFFFF_FFF0;
    @(negedge clk);
    checks++;
    if (rdata !== exp_data) begin failures++; $display("FAIL read %08h: %08h exp %08h", a, rdata, exp_data); end
  endtask
  initial begin
    repeat (2) @(posedge clk); rst = 0;
    probe(32'h0000_0000, DEV_PMEM, 0, 32'hA000_0000);
    probe(32'h0000_FFFC, DEV_PMEM, 16383, 32'hA000_3FFF);
    probe(32'h0001_0000, DEV_COUNTER, 0, 32'h1111_1111);
    probe(32'h0001_0004, DEV_ENTROPY, 0, 32'h2222_2222);
    probe(32'h0002_0000, DEV_VRAM, 0, 32'hB000_0000);
    probe(32'h0002_383C, DEV_VRAM, 3599, 32'hB000_0E0F);
    probe(32'h0002_3840, DEV_NONE, 0, 32'h0);
    probe(32'h0003_0004, DEV_KBD_BUF, 1, 32'hC000_0001);
    probe(32'h0003_0080, DEV_KBD_CTRL, 0, 32'hC000_0000);
    probe(32'h0004_0400, DEV_AES_IN, 256, 32'hD000_0100);
    probe(32'h0004_0404, DEV_AES_OUT, 0, 32'hD000_0000);
    probe(32'h0004_0804, DEV_AES_OUT, 256, 32'hD000_0100);
    probe(32'h0004_F000, DEV_AES_CTRL, 0, 32'hD000_0000);
    probe(32'h0005_0000, DEV_NONE, 0, 32'h0);
    // writes: enables pass only with a mapped device
    @(negedge clk); we = 1; re = 0; addr = 32'h0002_0010; be = 4'b0011; wdata = 32'hCAFE; #1;
    checks++; if (!(dev_we && dev == DEV_VRAM && dev_be == 4'b0011 && dev_word == 4)) begin failures++; $display("FAIL write vram"); end
    addr = 32'h0009_0000; #1;
    checks++; if (dev_we) begin failures++; $display("FAIL unmapped write enabled"); end
    @(negedge clk); we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
