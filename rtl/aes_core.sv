// aes_core: AES-128 engine controller. A start_enc or start_dec pulse
// latches the key and the data block, then expands the key: round key 0 is the
// key itself and aes_key_schedule produces keys 1..10, one per cycle, written
// into aes_key_memory. The selected cipher (aes_encryption or aes_decryption)
// is then started and reads the keys back by round index. done pulses for one
// cycle with the result on dout. Latency from start to done: 1 cycle to latch,
// 10 cycles of expansion, 1 cycle to start the cipher, 11 cipher cycles,
// 1 cycle to register the result: 24 cycles.
// From the Orca report: key expansion into the 11-entry key memory on every
// start, then encryption or decryption.
// Own choices: one round key and one cipher round per cycle (25 cycles per
// block).
module aes_core (
  input  logic            clk,
  input  logic            rst,
  input  logic            start_enc,
  input  logic            start_dec,
  input  aes_pkg::block_t key,
  input  aes_pkg::block_t din,
  output aes_pkg::block_t dout,
  output logic            busy,
  output logic            done
);
  import aes_pkg::*;
  typedef enum logic [2:0] {S_IDLE, S_KEY0, S_EXPAND, S_RUN, S_WAIT} state_e;
  state_e     st;
  logic       decrypt;
  block_t     data, kreg, knext, rk;
  logic [3:0] kcnt, enc_idx, dec_idx;
  logic       km_we;
  logic [3:0] km_waddr;
  block_t     km_wdata;
  logic       enc_start, dec_start, enc_busy, dec_busy, enc_done, dec_done;
  block_t     enc_out, dec_out;

  aes_key_schedule u_ks (.prev_key(kreg), .round(kcnt), .next_key(knext));

  always_comb begin
    km_we    = (st == S_KEY0) || (st == S_EXPAND);
    km_waddr = (st == S_KEY0) ? 4'd0 : kcnt;
    km_wdata = (st == S_KEY0) ? kreg : knext;
  end

  aes_key_memory u_km (
    .clk, .rst, .we(km_we), .waddr(km_waddr), .wdata(km_wdata),
    .raddr(decrypt ? dec_idx : enc_idx), .rdata(rk)
  );

  assign enc_start = (st == S_RUN) && !decrypt;
  assign dec_start = (st == S_RUN) &&  decrypt;

  aes_encryption u_enc (.clk, .rst, .start(enc_start), .din(data), .key_idx(enc_idx),
    .round_key(rk), .dout(enc_out), .busy(enc_busy), .done(enc_done));
  aes_decryption u_dec (.clk, .rst, .start(dec_start), .din(data), .key_idx(dec_idx),
    .round_key(rk), .dout(dec_out), .busy(dec_busy), .done(dec_done));

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; decrypt <= 1'b0; data <= '0; kreg <= '0; kcnt <= '0;
      dout <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start_enc || start_dec) begin
          decrypt <= start_dec && !start_enc;
          data    <= din;
          kreg    <= key;
          st      <= S_KEY0;
        end
        S_KEY0: begin kcnt <= 4'd1; st <= S_EXPAND; end
        S_EXPAND: begin
          kreg <= knext;
          kcnt <= kcnt + 4'd1;
          if (kcnt == 4'd10) st <= S_RUN;
        end
        S_RUN: st <= S_WAIT;
        S_WAIT: if (enc_done || dec_done) begin
          dout <= decrypt ? dec_out : enc_out;
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
