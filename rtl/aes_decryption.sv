// aes_decryption: iterative AES-128 inverse cipher, one round per clock.
// Each decryption round undoes one encryption round in reverse stage order:
// AddRoundKey with key 10, 9, ... 1, then InvMixColumns (skipped in the first
// round, which undoes the final encryption round), InvShiftRows and InvSubBytes
// (16 aes_inv_sbox instances). An eleventh cycle xors round key 0. A start
// pulse loads the ciphertext; done pulses with the plaintext on dout 12 cycles
// later. Round keys are read combinationally through key_idx.
// From the Orca report: inverse stages in reverse order with the round keys
// taken from 10 down to 0.
// Own choices: the four inverse stages of a round share one cycle.
module aes_decryption (
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
  block_t state, keyed, unmixed, unshifted, unsubbed;
  logic [3:0] step;   // 0..10; key index is 10-step

  assign keyed     = state ^ round_key;
  assign unmixed   = (step == 4'd0) ? keyed : inv_mix_columns(keyed);
  assign unshifted = inv_shift_rows(unmixed);

  for (genvar k = 0; k < 16; k++) begin : g_isb
    aes_inv_sbox u_isbox (.in(unshifted[127-8*k -: 8]), .out(unsubbed[127-8*k -: 8]));
  end

  assign key_idx = 4'd10 - step;
  assign dout    = state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= '0; step <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        state <= din; step <= 4'd0; busy <= 1'b1;
      end else if (busy) begin
        state <= (step == 4'd10) ? keyed : unsubbed;
        if (step == 4'd10) begin
          busy <= 1'b0; done <= 1'b1;
        end
        step <= step + 4'd1;
      end
    end
  end
endmodule
