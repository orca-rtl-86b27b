// tb_aes_core: encrypts and decrypts the FIPS-197 appendix B and C.1
// vectors through the complete engine (key expansion, key memory, ciphers),
// then round-trips random blocks under random keys, and checks the fixed
// start-to-done latency of 25 cycles.
// Reference values come from FIPS-197 vectors; the 25-cycle latency is a
// design choice.
module tb_aes_core;
  logic clk = 0, rst = 1, start_enc = 0, start_dec = 0, busy, done;
  logic [127:0] key = 0, din = 0, dout;
  int checks = 0, failures = 0;
  aes_core dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(input logic dec, input logic [127:0] k, input logic [127:0] in, output logic [127:0] res);
    int cyc;
    @(negedge clk); key = k; din = in; start_enc = !dec; start_dec = dec;
    @(negedge clk); start_enc = 0; start_dec = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    res = dout;
    checks++;
    if (cyc != 25) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask
  task automatic expect_eq(input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL got %032h exp %032h", got, exp); end
  endtask
  initial begin
    logic [127:0] r, r2, k, p;
    repeat (2) @(posedge clk); rst <= 0;
    run(0, 128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, r);
    expect_eq(r, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(1, 128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, r);
    expect_eq(r, 128'h00112233445566778899aabbccddeeff);
    run(0, 128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, r);
    expect_eq(r, 128'h3925841d02dc09fbdc118597196a0b32);
    run(1, 128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3925841d02dc09fbdc118597196a0b32, r);
    expect_eq(r, 128'h3243f6a8885a308d313198a2e0370734);
    for (int i = 0; i < 8; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(0, k, p, r);
      run(1, k, r, r2);
      expect_eq(r2, p);
      checks++;
      if (r == p) begin failures++; $display("FAIL ciphertext equals plaintext"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
