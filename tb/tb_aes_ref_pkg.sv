// tb_aes_ref_pkg: reference arithmetic for the AES testbenches, written
// independently of the RTL: the S-box is found by brute-force search for the
// GF(2^8) inverse and the affine map is applied as a matrix of rotations; the
// key expansion works on 32-bit words as in FIPS-197 section 5.2.
// Based on FIPS-197 definitions, written independently of the RTL.
package tb_aes_ref_pkg;
  function automatic logic [7:0] ref_mul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= (16'(a) << i);
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= (16'h11b << (i - 8));
    return p[7:0];
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] x);
    logic [7:0] inv, r;
    inv = 8'h00;
    for (int y = 1; y < 256; y++) if (ref_mul(x, 8'(y)) == 8'h01) inv = 8'(y);
    r = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]} ^ {inv[3:0], inv[7:4]};
    return r ^ 8'h63;
  endfunction

  function automatic logic [31:0] sub_word(input logic [31:0] w);
    return {ref_sbox(w[31:24]), ref_sbox(w[23:16]), ref_sbox(w[15:8]), ref_sbox(w[7:0])};
  endfunction

  // Round key n (0..10) of a 128-bit key.
  function automatic logic [127:0] ref_round_key(input logic [127:0] key, input int n);
    logic [31:0] w [44];
    logic [7:0] rc;
    {w[0], w[1], w[2], w[3]} = key;
    rc = 8'h01;
    for (int i = 4; i < 44; i++) begin
      if (i % 4 == 0) begin
        w[i] = w[i-4] ^ sub_word({w[i-1][23:0], w[i-1][31:24]}) ^ {rc, 24'h0};
        rc = ref_mul(rc, 8'h02);
      end else w[i] = w[i-4] ^ w[i-1];
    end
    return {w[4*n], w[4*n+1], w[4*n+2], w[4*n+3]};
  endfunction
endpackage
