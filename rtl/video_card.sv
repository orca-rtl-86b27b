// video_card: text-mode renderer, 160 x 45 character cells of 8 x 16 pixels
// filling a 1280 x 720 picture, in the pixel clock domain.
// From video_sig_gen's counters it forms the cell index k (cell_idx) = 160*(v/16) + h/8
// and reads word k/2 of the video RAM (cycle 1), picks the character and
// attribute of cell k, looks up the glyph row {char, v%16} in font_brom and
// decodes the attribute in attribute_brom (cycle 2), then selects dot 7-h%8
// and the foreground or background colour (cycle 3, registered output). A
// blinking cell shows only its background while bit 5 of the frame counter is
// set (about 0.5 s on, 0.5 s off at 60 Hz). Syncs and data-enable are delayed
// by the same three cycles. Outside the picture rgb is black.
// From the Orca report: 160x45 cells of 8x16 pixels, 720p, font and
// attribute lookup, blink.
// Own choices: three-cycle pipeline, blink rate, raw RGB output instead of
// HDMI.
module video_card #(
  parameter string FONT_FILE = "",
  parameter int ACTIVE_H = 1280, H_FP = 110, H_SYNC = 40, H_BP = 220,
  parameter int ACTIVE_V = 720,  V_FP = 5,   V_SYNC = 5,  V_BP = 20,
  localparam int COLS = ACTIVE_H / 8
) (
  input  logic        clk,
  input  logic        rst,
  output logic [11:0] vram_addr,
  input  logic [31:0] vram_rdata,
  output logic [23:0] rgb,
  output logic        hsync,
  output logic        vsync,
  output logic        de,
  output logic        frame_start
);
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hs0, vs0, act0;
  logic [5:0]  frame_count;
  logic [12:0] cell_idx;

  video_sig_gen #(.ACTIVE_H(ACTIVE_H), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
                  .ACTIVE_V(ACTIVE_V), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)) u_sig (
    .clk, .rst, .hcount, .vcount, .hsync(hs0), .vsync(vs0), .active(act0),
    .new_frame(frame_start), .frame_count
  );

  assign cell_idx      = act0 ? 13'(COLS * 32'(vcount[9:4]) + 32'(hcount[10:3])) : 13'd0;
  assign vram_addr = cell_idx[12:1];

  // stage 1: video RAM data arrives
  logic [2:0] hs_d, vs_d, act_d;
  logic [2:0] dot1, dot2;
  logic [3:0] row1;
  logic       odd1;
  logic [7:0] ch1, at1;
  always_ff @(posedge clk) begin
    if (rst) begin
      hs_d <= '0; vs_d <= '0; act_d <= '0; dot1 <= '0; dot2 <= '0; row1 <= '0; odd1 <= 1'b0;
    end else begin
      hs_d  <= {hs_d[1:0], hs0};
      vs_d  <= {vs_d[1:0], vs0};
      act_d <= {act_d[1:0], act0};
      dot1  <= hcount[2:0];
      row1  <= vcount[3:0];
      odd1  <= cell_idx[0];
      dot2  <= dot1;
    end
  end
  assign ch1 = odd1 ? vram_rdata[23:16] : vram_rdata[7:0];
  assign at1 = odd1 ? vram_rdata[31:24] : vram_rdata[15:8];

  // stage 2: glyph row and colours
  logic [7:0]  dots;
  logic [23:0] fg, bg;
  logic        blink;
  font_brom #(.INIT_FILE(FONT_FILE)) u_font (.clk, .addr({ch1, row1}), .dots);
  attribute_brom u_attr (.clk, .attr(at1), .fg, .bg, .blink);

  // stage 3: pixel
  logic on;
  assign on = dots[3'd7 - dot2] && !(blink && frame_count[5]);
  always_ff @(posedge clk) begin
    if (rst) begin
      rgb <= '0; hsync <= 1'b0; vsync <= 1'b0; de <= 1'b0;
    end else begin
      rgb   <= act_d[1] ? (on ? fg : bg) : 24'h0;
      hsync <= hs_d[1];
      vsync <= vs_d[1];
      de    <= act_d[1];
    end
  end
endmodule
