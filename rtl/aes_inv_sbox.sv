// aes_inv_sbox: inverse Rijndael S-box, combinational. Computed as the inverse
// affine transform (constant 0x05) followed by the GF(2^8) inverse, which
// undoes aes_sbox exactly. Used sixteen times per decryption round.
// From the Orca report: an inverse S-box for decryption.
// Own choices: computed (inverse affine map, then GF inverse) rather than
// tabulated.
module aes_inv_sbox (
  input  logic [7:0] in,
  output logic [7:0] out
);
  assign out = aes_pkg::inv_sbox(in);
endmodule
