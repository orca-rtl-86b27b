// ps2_rx: receiver for the PS/2 keyboard port. ps2_clk and ps2_data are
// synchronised with two flops each; the data line is sampled on each falling
// edge of the keyboard clock. A frame is a start bit (0), eight data bits LSB
// first, an odd parity bit and a stop bit (1). The state machine walks
// IDLE -> DATA (8 bits) -> PARITY -> STOP; a frame whose parity or stop bit is
// wrong raises err for one cycle instead of valid. valid pulses for one cycle
// with the scancode on code. Key release codes (0xF0 prefix) are passed on as
// ordinary bytes.
// From the Orca report: start, 8 data bits, odd parity, stop bit (11 bits).
// Own choices: falling-edge sampling after a 3-flop synchroniser; bad
// frames dropped.
module ps2_rx (
  input  logic       clk,
  input  logic       rst,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  output logic [7:0] code,
  output logic       valid,
  output logic       err
);
  typedef enum logic [1:0] {K_IDLE, K_DATA, K_PARITY, K_STOP} kstate_e;
  kstate_e    st;
  logic [2:0] csync, dsync;
  logic [2:0] bitn;
  logic [7:0] sh;
  logic       par_ok, fall;

  assign fall = csync[2] && !csync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      csync <= 3'b111; dsync <= 3'b111; st <= K_IDLE; bitn <= '0; sh <= '0;
      par_ok <= 1'b0; code <= '0; valid <= 1'b0; err <= 1'b0;
    end else begin
      csync <= {csync[1:0], ps2_clk};
      dsync <= {dsync[1:0], ps2_data};
      valid <= 1'b0;
      err   <= 1'b0;
      if (fall) begin
        unique case (st)
          K_IDLE: if (!dsync[1]) begin st <= K_DATA; bitn <= '0; end
          K_DATA: begin
            sh   <= {dsync[1], sh[7:1]};
            bitn <= bitn + 3'd1;
            if (bitn == 3'd7) st <= K_PARITY;
          end
          K_PARITY: begin
            par_ok <= (^sh) ^ dsync[1];   // odd parity over data and parity bit
            st     <= K_STOP;
          end
          K_STOP: begin
            st <= K_IDLE;
            if (par_ok && dsync[1]) begin code <= sh; valid <= 1'b1; end
            else err <= 1'b1;
          end
          default: st <= K_IDLE;
        endcase
      end
    end
  end
endmodule
