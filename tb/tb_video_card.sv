// tb_video_card: renders frames from a video RAM model with random
// characters and attributes and compares every output pixel with the colour
// worked out here from the cell layout, the built-in font pattern and the VGA
// palette, three pixel clocks after the position. A reduced 64 x 32 picture
// (8 x 2 cells) keeps frames short so that the blink phase (frame counter bit
// 5) is reached; the 720p geometry is exercised by the top-level test.
// Reference values come from a model of the cell, font and attribute
// lookup; the picture size is reduced through parameters.
module tb_video_card;
  localparam int AH = 64, HF = 4, HS = 4, HB = 8, AV = 32, VF = 2, VS = 2, VB = 2;
  localparam int HT = AH + HF + HS + HB, VT = AV + VF + VS + VB, COLS = AH / 8;
  logic clk = 0, rst = 1, hsync, vsync, de, frame_start;
  logic [11:0] vram_addr;
  logic [31:0] vram_rdata;
  logic [23:0] rgb;
  logic [31:0] vmem [16];
  int checks = 0, failures = 0, n_blank_blink = 0;
  logic [23:0] pal [16] = '{24'h000000, 24'h0000AA, 24'h00AA00, 24'h00AAAA, 24'hAA0000, 24'hAA00AA,
                            24'hAA5500, 24'hAAAAAA, 24'h555555, 24'h5555FF, 24'h55FF55, 24'h55FFFF,
                            24'hFF5555, 24'hFF55FF, 24'hFFFF55, 24'hFFFFFF};
  video_card #(.ACTIVE_H(AH), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
               .ACTIVE_V(AV), .V_FP(VF), .V_SYNC(VS), .V_BP(VB)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) vram_rdata <= vmem[vram_addr[3:0]];
  initial begin
    repeat (1000000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic [23:0] expected(input int x, input int y, input int frame);
    int k; logic [7:0] ch, at, dots;
    if (x >= AH || y >= AV) return 24'h0;
    k = (y / 16) * COLS + x / 8;
    ch = vmem[k / 2][16 * (k % 2) +: 8];
    at = vmem[k / 2][16 * (k % 2) + 8 +: 8];
    dots = (y % 16 == 0 || y % 16 == 15) ? 8'h00 : ch;
    if (dots[7 - x % 8] && !(at[7] && frame[5])) return pal[at[3:0]];
    return pal[{1'b0, at[6:4]}];
  endfunction
  initial begin
    int n, x, y, fr, lat;
    for (int i = 0; i < 16; i++) vmem[i] = $urandom;
    vmem[0][15] = 1'b1;   // first cell blinks
    vmem[0][7:0] = 8'hFF; // with all dots lit
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    lat = 3;
    for (n = 0; n < HT * VT * 40; n++) begin
      @(negedge clk);
      // output now belongs to position n - lat + 1
      if (n >= lat - 1) begin
        int p; p = n - lat + 1;
        x = p % HT; y = (p / HT) % VT; fr = p / (HT * VT);
        checks++;
        if (rgb !== expected(x, y, fr) || de !== (x < AH && y < AV) ||
            hsync !== (x >= AH + HF && x < AH + HF + HS) || vsync !== (y >= AV + VF && y < AV + VF + VS)) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d) frame %0d rgb %06h exp %06h", x, y, fr, rgb, expected(x, y, fr));
        end
        if (x == 3 && y == 5 && fr[5]) n_blank_blink++;
      end
    end
    checks++;
    if (n_blank_blink == 0) begin failures++; $display("FAIL blink phase never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
