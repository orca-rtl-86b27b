// tb_aes_workload: the encrypt/decrypt demo workload on the AES co-processor
// at its default size (257-word buffers, no parameter override). It fills the
// whole input buffer with 64 blocks (random data, with the FIPS-197 C.1
// plaintext in the first and last block) and the terminator, encrypts,
// checks both known blocks against the C.1 ciphertext (ECB: equal inputs give
// equal outputs), copies the output back, decrypts and checks that all 64
// blocks round-trip. It reports the cycles for the full buffer and checks
// them against 34 cycles per block plus a small constant.
// Reference values come from FIPS-197 C.1 and the round-trip property; the
// cycles per block are this design's own timing.
module tb_aes_workload;
  localparam int WORDS = 257, AW = 9, NBLK = 64;
  logic clk = 0, rst = 1;
  logic sel_in = 0, sel_out = 0, sel_ctrl = 0, we = 0;
  logic [3:0] be = 4'hf;
  logic [AW-1:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [7:0] ctrl;
  int checks = 0, failures = 0;
  aes_coprocessor dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic [31:0] bswap(input logic [31:0] w);
    return {w[7:0], w[15:8], w[23:16], w[31:24]};
  endfunction
  task automatic wr(input int buf_sel, input int a, input logic [31:0] d);
    @(negedge clk); sel_in = (buf_sel == 0); sel_ctrl = (buf_sel == 2); sel_out = 0;
    we = 1; addr = AW'(a); wdata = d;
    @(negedge clk); we = 0; sel_in = 0; sel_ctrl = 0;
  endtask
  task automatic rd(input int buf_sel, input int a, output logic [31:0] d);
    @(negedge clk); sel_out = (buf_sel == 1); sel_in = (buf_sel == 0); sel_ctrl = (buf_sel == 2);
    we = 0; addr = AW'(a);
    @(negedge clk); d = rdata; sel_out = 0; sel_in = 0; sel_ctrl = 0;
  endtask
  task automatic chk(input logic [127:0] got, input logic [127:0] exp, input string w);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s %032h exp %032h", w, got, exp); end
  endtask
  task automatic put_block(input int blk, input logic [127:0] b);
    for (int i = 0; i < 4; i++) wr(0, 4*blk + i, bswap(b[127-32*i -: 32]));
  endtask
  task automatic get_block(input int blk, output logic [127:0] b);
    logic [31:0] d;
    for (int i = 0; i < 4; i++) begin rd(1, 4*blk + i, d); b[127-32*i -: 32] = bswap(d); end
  endtask
  task automatic run(input logic [1:0] mode, output int cyc);
    wr(2, 0, {30'h0, mode});
    cyc = 0;
    while (!ctrl[2]) begin @(posedge clk); cyc++; end
  endtask
  initial begin
    localparam logic [127:0] PT = 128'h00112233445566778899aabbccddeeff;
    localparam logic [127:0] CT = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    logic [127:0] p [NBLK], b;
    int cyc;
    repeat (2) @(posedge clk); rst <= 0;
    for (int k = 0; k < NBLK; k++) begin
      p[k] = (k == 0 || k == NBLK - 1) ? PT : {$urandom, $urandom, $urandom, $urandom};
      put_block(k, p[k]);
    end
    wr(0, 4 * NBLK, 32'hDEADBEEF);
    run(2'b01, cyc);
    $display("encrypt %0d blocks: %0d cycles (%0d per block)", NBLK, cyc, cyc / NBLK);
    checks++;
    if (cyc > 34 * NBLK + 8) begin failures++; $display("FAIL encrypt took %0d cycles", cyc); end
    get_block(0, b); chk(b, CT, "first block");
    get_block(NBLK - 1, b); chk(b, CT, "last block");
    for (int k = 0; k < NBLK; k++) begin get_block(k, b); put_block(k, b); end
    run(2'b10, cyc);
    $display("decrypt %0d blocks: %0d cycles", NBLK, cyc);
    checks++;
    if (cyc > 34 * NBLK + 8) begin failures++; $display("FAIL decrypt took %0d cycles", cyc); end
    for (int k = 0; k < NBLK; k++) begin get_block(k, b); chk(b, p[k], $sformatf("round trip %0d", k)); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
