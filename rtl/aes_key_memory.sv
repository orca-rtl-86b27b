// aes_key_memory: holds the 11 round keys (the cipher key and the ten
// expanded keys). One synchronous write port, filled by aes_core during key
// expansion, and one combinational read port addressed by the round counter of
// the running cipher. Eleven 128-bit registers; contents are cleared on reset.
// From the Orca report: 11 round keys held in aes_key_memory.
// Own choices: registers with a combinational read so a round uses its key
// in the same cycle.
module aes_key_memory (
  input  logic            clk,
  input  logic            rst,
  input  logic            we,
  input  logic [3:0]      waddr,
  input  aes_pkg::block_t wdata,
  input  logic [3:0]      raddr,
  output aes_pkg::block_t rdata
);
  aes_pkg::block_t keys [11];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 11; i++) keys[i] <= '0;
    end else if (we && waddr <= 4'd10) begin
      keys[waddr] <= wdata;
    end
  end

  assign rdata = (raddr <= 4'd10) ? keys[raddr] : '0;
endmodule
