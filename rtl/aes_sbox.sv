// aes_sbox: Rijndael S-box, one byte in, one byte out, purely combinational.
// The table is computed from its definition (GF(2^8) inverse then the affine
// transform with constant 0x63) by aes_pkg::sbox; synthesis folds it into
// lookup logic. Used sixteen times per encryption round and four times in the
// key schedule.
// From the Orca report: the S-box is combinational logic.
// Own choices: computed by GF inversion and the affine map.
module aes_sbox (
  input  logic [7:0] in,
  output logic [7:0] out
);
  assign out = aes_pkg::sbox(in);
endmodule
