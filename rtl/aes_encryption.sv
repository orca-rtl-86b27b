// aes_encryption: iterative AES-128 cipher, one round per clock.
// A start pulse loads the plaintext. The next cycle xors round key 0, then
// each of the following ten cycles applies SubBytes (16 aes_sbox instances),
// ShiftRows, MixColumns (skipped in round 10) and AddRoundKey with round key n,
// read combinationally from aes_key_memory through key_idx. done pulses in the
// cycle the ciphertext appears on dout, 12 cycles after the start edge.
// From the Orca report: 10 rounds of SubBytes, ShiftRows, MixColumns and
// AddRoundKey, no MixColumns in the last round.
// Own choices: all four stages of a round in one cycle; FIPS-197 byte order
// in the 128-bit word.
module aes_encryption (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  aes_pkg::block_t din,
  output logic [3:0]      key_idx,
  input  aes_pkg::block_t round_key,
  output aes_pkg::block_t dout,
  output logic            busy,
  output logic            done
);
  import aes_pkg::*;
  block_t state, subbed, shifted, mixed;
  logic [3:0] round;

  for (genvar k = 0; k < 16; k++) begin : g_sb
    aes_sbox u_sbox (.in(state[127-8*k -: 8]), .out(subbed[127-8*k -: 8]));
  end

  assign shifted = shift_rows(subbed);
  assign mixed   = (round == 4'd10) ? shifted : mix_columns(shifted);
  assign key_idx = round;
  assign dout    = state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= '0; round <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        state <= din; round <= 4'd0; busy <= 1'b1;
      end else if (busy) begin
        state <= ((round == 4'd0) ? state : mixed) ^ round_key;
        if (round == 4'd10) begin
          busy <= 1'b0; done <= 1'b1;
        end
        round <= round + 4'd1;
      end
    end
  end
endmodule
