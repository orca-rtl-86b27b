// tb_aes_sbox: compares all 256 S-box outputs with a brute-force reference
// and with published FIPS-197 values.
// Reference values come from a table-free reference in tb_aes_ref_pkg and
// FIPS-197 sample entries.
module tb_aes_sbox;
  import tb_aes_ref_pkg::*;
  logic [7:0] in, out;
  int checks = 0, failures = 0;
  aes_sbox dut (.in, .out);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic [7:0] exp);
    checks++;
    if (out !== exp) begin failures++; $display("FAIL sbox(%02h)=%02h exp %02h", in, out, exp); end
  endtask
  initial begin
    in = 8'h00; #1 chk(8'h63);
    in = 8'h53; #1 chk(8'hed);
    in = 8'hff; #1 chk(8'h16);
    in = 8'h10; #1 chk(8'hca);
    for (int i = 0; i < 256; i++) begin in = 8'(i); #1 chk(ref_sbox(8'(i))); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
