// tb_aes_inv_sbox: checks that the inverse S-box undoes the reference S-box
// for all 256 inputs, plus published values.
// Reference values come from the inverse of the reference S-box in
// tb_aes_ref_pkg.
module tb_aes_inv_sbox;
  import tb_aes_ref_pkg::*;
  logic [7:0] in, out;
  int checks = 0, failures = 0;
  aes_inv_sbox dut (.in, .out);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic [7:0] exp);
    checks++;
    if (out !== exp) begin failures++; $display("FAIL isbox(%02h)=%02h exp %02h", in, out, exp); end
  endtask
  initial begin
    in = 8'h63; #1 chk(8'h00);
    in = 8'h00; #1 chk(8'h52);
    in = 8'hed; #1 chk(8'h53);
    for (int i = 0; i < 256; i++) begin in = ref_sbox(8'(i)); #1 chk(8'(i)); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
