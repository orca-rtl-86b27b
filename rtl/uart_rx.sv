// uart_rx: 8N1 serial receiver. The rx line is synchronised with two flops.
// A falling edge (high to low) starts a frame, so a line held low after a
// framing error does not start spurious frames; the start bit is checked again half a bit
// later, then the eight data bits (LSB first) are sampled in the middle of
// each bit period of CLKS_PER_BIT cycles, and the stop bit must be high. A
// good frame gives a one-cycle valid pulse with the byte on data; a frame with
// a low stop bit is dropped. 434 cycles per bit is 115200 baud at 50 MHz.
// From the Orca report: a UART receiver for the programmer.
// Own choices: 115200 baud 8N1 and the synchroniser.
module uart_rx #(
  parameter int CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid
);
  typedef enum logic [1:0] {U_IDLE, U_START, U_DATA, U_STOP} ustate_e;
  ustate_e st;
  logic [2:0] sync;
  logic [$clog2(CLKS_PER_BIT)-1:0] cnt;
  logic [2:0] bitn;
  logic [7:0] sh;
  localparam int CW = $clog2(CLKS_PER_BIT);

  always_ff @(posedge clk) begin
    if (rst) begin
      sync <= 3'b111; st <= U_IDLE; cnt <= '0; bitn <= '0; sh <= '0; data <= '0; valid <= 1'b0;
    end else begin
      sync  <= {sync[1:0], rx};
      valid <= 1'b0;
      unique case (st)
        U_IDLE: if (sync[2] && !sync[1]) begin st <= U_START; cnt <= '0; end
        U_START: begin
          if (cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt <= '0;
            if (!sync[1]) begin st <= U_DATA; bitn <= '0; end
            else st <= U_IDLE;
          end else cnt <= cnt + 1'b1;
        end
        U_DATA: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt  <= '0;
            sh   <= {sync[1], sh[7:1]};
            bitn <= bitn + 3'd1;
            if (bitn == 3'd7) st <= U_STOP;
          end else cnt <= cnt + 1'b1;
        end
        U_STOP: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            st <= U_IDLE;
            cnt <= '0;
            if (sync[1]) begin data <= sh; valid <= 1'b1; end
          end else cnt <= cnt + 1'b1;
        end
        default: st <= U_IDLE;
      endcase
    end
  end
endmodule
