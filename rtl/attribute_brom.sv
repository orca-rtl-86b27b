// attribute_brom: decodes a text-mode attribute byte into colours, as the
// IBM VGA text modes do: bits [3:0] select one of 16 foreground colours,
// bits [6:4] one of the first 8 as background, and bit 7 makes the cell
// blink. Colours are the standard 16-entry VGA palette (black, blue, green,
// cyan, red, magenta, brown, light grey, then their bright versions) as
// 24-bit RGB. Output registered (one cycle), like a block ROM.
// From the Orca report: 16 foreground colours, 8 background colours from
// the VGA palette, blink flag.
// Own choices: the attribute bit layout (PC text-mode style) and the exact
// 24-bit palette values.
module attribute_brom (
  input  logic        clk,
  input  logic [7:0]  attr,
  output logic [23:0] fg,
  output logic [23:0] bg,
  output logic        blink
);
  function automatic logic [23:0] palette(input logic [3:0] i);
    unique case (i)
      4'h0: return 24'h000000;  4'h1: return 24'h0000AA;
      4'h2: return 24'h00AA00;  4'h3: return 24'h00AAAA;
      4'h4: return 24'hAA0000;  4'h5: return 24'hAA00AA;
      4'h6: return 24'hAA5500;  4'h7: return 24'hAAAAAA;
      4'h8: return 24'h555555;  4'h9: return 24'h5555FF;
      4'hA: return 24'h55FF55;  4'hB: return 24'h55FFFF;
      4'hC: return 24'hFF5555;  4'hD: return 24'hFF55FF;
      4'hE: return 24'hFFFF55;  default: return 24'hFFFFFF;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    fg    <= palette(attr[3:0]);
    bg    <= palette({1'b0, attr[6:4]});
    blink <= attr[7];
  end
endmodule
