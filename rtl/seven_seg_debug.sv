// seven_seg_debug: shows one 32-bit debug value as eight hexadecimal digits
// on a multiplexed eight-digit seven-segment display, as used in halting
// mode to inspect the processor.
// view selects the value: 0..4 the pc of IF, ID, EX, MEM, WB; 5 the
// instruction in ID; 6 and 7 the register chosen on the register-select
// switches (dbg.reg_data). A free-running divider moves to the next digit
// every SCAN_DIV cycles (1 ms at 50 MHz by default), so each digit is lit one
// eighth of the time. an[i] (active low) enables digit i, digit 0 being the
// least significant nibble; seg = {g,f,e,d,c,b,a}, active low. The digit and
// its segments change together on the same clock edge (registered outputs).
// From the Orca report: the processor's stage pcs, the ID instruction and any
// register can be viewed on the seven-segment display, selected with switches.
// Own choices: the view encoding, eight digits on one shared segment bus,
// active-low outputs and the scan rate.
module seven_seg_debug
  import orca_pkg::*;
#(
  parameter int SCAN_DIV = 50000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] view,
  input  dbg_t       dbg,
  output logic [7:0] an,
  output logic [6:0] seg
);
  localparam int DW = $clog2(SCAN_DIV);
  logic [DW-1:0] div;
  logic [2:0]    digit;
  logic [31:0]   value;
  logic [3:0]    nib;

  always_comb begin
    unique case (view)
      3'd0:    value = dbg.pc_if;
      3'd1:    value = dbg.pc_id;
      3'd2:    value = dbg.pc_ex;
      3'd3:    value = dbg.pc_mem;
      3'd4:    value = dbg.pc_wb;
      3'd5:    value = dbg.instr_id;
      default: value = dbg.reg_data;
    endcase
    nib = value[4*digit +: 4];
  end

  // segments {g,f,e,d,c,b,a}, 1 = lit
  function automatic logic [6:0] hex7(input logic [3:0] h);
    unique case (h)
      4'h0: return 7'b0111111;  4'h1: return 7'b0000110;
      4'h2: return 7'b1011011;  4'h3: return 7'b1001111;
      4'h4: return 7'b1100110;  4'h5: return 7'b1101101;
      4'h6: return 7'b1111101;  4'h7: return 7'b0000111;
      4'h8: return 7'b1111111;  4'h9: return 7'b1101111;
      4'hA: return 7'b1110111;  4'hB: return 7'b1111100;
      4'hC: return 7'b0111001;  4'hD: return 7'b1011110;
      4'hE: return 7'b1111001;  default: return 7'b1110001;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      div <= '0; digit <= '0; an <= 8'hFF; seg <= 7'h7F;
    end else begin
      if (div == DW'(SCAN_DIV - 1)) begin
        div   <= '0;
        digit <= digit + 3'd1;
      end else div <= div + 1'b1;
      an  <= ~(8'd1 << digit);
      seg <= ~hex7(nib);
    end
  end
endmodule
