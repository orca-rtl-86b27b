// aes_key_schedule: one step of the AES-128 key expansion. Given round key
// n-1 and the round number n (1..10) it produces round key n: the last word is
// rotated, passed through four S-boxes and xored with the round constant
// Rcon[n]; the four words are then chained by xor. Combinational; aes_core
// applies it once per cycle, so the ten keys take ten cycles.
// From the Orca report: the AES-128 key schedule producing 10 keys after
// the input key.
// Own choices: one step per cycle, combinational.
module aes_key_schedule (
  input  aes_pkg::block_t prev_key,
  input  logic [3:0]      round,     // 1..10
  output aes_pkg::block_t next_key
);
  logic [31:0] w0, w1, w2, w3, rot, sub, t;
  logic [7:0]  rcon;

  assign {w0, w1, w2, w3} = prev_key;
  assign rot = {w3[23:0], w3[31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sb
    aes_sbox u_sbox (.in(rot[8*i +: 8]), .out(sub[8*i +: 8]));
  end

  always_comb begin
    case (round)
      4'd1: rcon = 8'h01;  4'd2: rcon = 8'h02;  4'd3: rcon = 8'h04;
      4'd4: rcon = 8'h08;  4'd5: rcon = 8'h10;  4'd6: rcon = 8'h20;
      4'd7: rcon = 8'h40;  4'd8: rcon = 8'h80;  4'd9: rcon = 8'h1b;
      4'd10: rcon = 8'h36; default: rcon = 8'h00;
    endcase
    t = sub ^ {rcon, 24'h0};
    next_key[127:96] = w0 ^ t;
    next_key[95:64]  = w0 ^ t ^ w1;
    next_key[63:32]  = w0 ^ t ^ w1 ^ w2;
    next_key[31:0]   = w0 ^ t ^ w1 ^ w2 ^ w3;
  end
endmodule
