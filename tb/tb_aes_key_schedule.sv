// tb_aes_key_schedule: chains the key-expansion step ten times for two keys
// and compares every round key with the reference expansion and with the
// FIPS-197 appendix A.1 values for rounds 1 and 10.
// Reference values come from FIPS-197 A.1 and the key expansion in
// tb_aes_ref_pkg.
module tb_aes_key_schedule;
  import tb_aes_ref_pkg::*;
  logic [127:0] prev, next;
  logic [3:0] round;
  int checks = 0, failures = 0;
  aes_key_schedule dut (.prev_key(prev), .round, .next_key(next));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic [127:0] exp, input string what);
    checks++;
    if (next !== exp) begin failures++; $display("FAIL %s: %032h exp %032h", what, next, exp); end
  endtask
  initial begin
    logic [127:0] keys [2];
    keys[0] = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    keys[1] = 128'h000102030405060708090a0b0c0d0e0f;
    for (int k = 0; k < 2; k++) begin
      prev = keys[k];
      for (int r = 1; r <= 10; r++) begin
        round = 4'(r); #1;
        chk(ref_round_key(keys[k], r), $sformatf("key%0d round %0d", k, r));
        if (k == 0 && r == 1)  chk(128'ha0fafe1788542cb123a339392a6c7605, "A.1 round 1");
        if (k == 0 && r == 10) chk(128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "A.1 round 10");
        if (k == 1 && r == 10) chk(128'h13111d7fe3944a17f307a78b4d2b30c5, "C.1 round 10");
        prev = next;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
