// uart_programmer: interprets the byte stream from uart_rx as commands to
// the processor. Four commands, each a command byte (ASCII):
//   'W' (0x57) + 4 address bytes + 4 data bytes, both least significant byte
//       first: write the 32-bit word to program memory (address is a byte
//       address; its two low bits are ignored),
//   'R' (0x52): reset the core (pc, registers, pipeline, caches), one cycle,
//   'H' (0x48): halt the core,
//   'S' (0x53): start the core (leave halt).
// Other command bytes are ignored. The write strobe mem_we lasts one cycle.
// halt is high after reset, so a loader can fill memory before starting.
// From the Orca report: write word, reset, halt and start commands.
// Own choices: the byte encoding of the commands and halted-at-power-up.
module uart_programmer (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  output logic        core_reset,
  output logic        halt
);
  typedef enum logic [1:0] {P_CMD, P_ADDR, P_DATA} pstate_e;
  pstate_e    st;
  logic [1:0] nbyte;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= P_CMD; nbyte <= '0; mem_we <= 1'b0; mem_addr <= '0; mem_wdata <= '0;
      core_reset <= 1'b0; halt <= 1'b1;
    end else begin
      mem_we     <= 1'b0;
      core_reset <= 1'b0;
      if (rx_valid) begin
        unique case (st)
          P_CMD: begin
            nbyte <= '0;
            unique case (rx_data)
              8'h57: st <= P_ADDR;
              8'h52: core_reset <= 1'b1;
              8'h48: halt <= 1'b1;
              8'h53: halt <= 1'b0;
              default: ;
            endcase
          end
          P_ADDR: begin
            mem_addr <= {rx_data, mem_addr[31:8]};
            nbyte    <= nbyte + 2'd1;
            if (nbyte == 2'd3) st <= P_DATA;
          end
          P_DATA: begin
            mem_wdata <= {rx_data, mem_wdata[31:8]};
            nbyte     <= nbyte + 2'd1;
            if (nbyte == 2'd3) begin st <= P_CMD; mem_we <= 1'b1; end
          end
          default: st <= P_CMD;
        endcase
      end
    end
  end
endmodule
