// font_brom: character generator ROM, 256 glyphs of 16 rows by 8 dots
// (4 KiB). The address is {character, row}; the output is the row's eight
// dots, MSB leftmost, registered (one cycle of latency, as a block ROM).
// The glyph bitmaps of IBM code page 437 are loaded from INIT_FILE (one byte
// per line, 4096 lines, glyph-major). Without a file the ROM holds a
// recognisable test pattern so the video path can be checked: rows 1..14 of
// glyph c are c itself, rows 0 and 15 are blank.
// From the Orca report: glyphs of 8x16 dots loaded from a memory file.
// Own choices: the glyph data are not part of this design; a test pattern
// is used without a file.
module font_brom #(
  parameter string INIT_FILE = ""
) (
  input  logic        clk,
  input  logic [11:0] addr,
  output logic [7:0]  dots
);
  logic [7:0] rom [4096];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
    else
      for (int i = 0; i < 4096; i++)
        rom[i] = (i[3:0] == 4'd0 || i[3:0] == 4'd15) ? 8'h00 : 8'(i >> 4);
  end

  always_ff @(posedge clk) dots <= rom[addr];
endmodule
