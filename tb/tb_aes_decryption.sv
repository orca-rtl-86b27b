// tb_aes_decryption: runs the FIPS-197 appendix B and C.1 vectors
// through aes_decryption, supplying round keys from the reference key
// expansion by the module's key index. Checks the result and that done comes
// exactly 12 cycles after the start edge (one load cycle, eleven round cycles).
// Reference values come from FIPS-197 C.1; the 12-cycle latency is a design
// choice.
module tb_aes_decryption;
  import tb_aes_ref_pkg::*;
  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [127:0] din = 0, dout, round_key, key;
  logic [3:0] key_idx;
  int checks = 0, failures = 0;
  aes_decryption dut (.*);
  always #5 clk = ~clk;
  logic [127:0] rk [11];
  assign round_key = (key_idx <= 10) ? rk[key_idx] : '0;
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(input logic [127:0] k, input logic [127:0] in, input logic [127:0] exp);
    int cyc;
    for (int i = 0; i < 11; i++) rk[i] = ref_round_key(k, i);
    @(negedge clk); din = in; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (dout !== exp) begin failures++; $display("FAIL %032h -> %032h exp %032h", in, dout, exp); end
    checks++;
    if (cyc != 12) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask
  initial begin
    logic [127:0] pt, ct;
    repeat (2) @(posedge clk); rst <= 0;
    pt = 128'h00112233445566778899aabbccddeeff; ct = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    run(128'h000102030405060708090a0b0c0d0e0f, ct, pt);
    pt = 128'h3243f6a8885a308d313198a2e0370734; ct = 128'h3925841d02dc09fbdc118597196a0b32;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, ct, pt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
