// video_sig_gen: video timing generator, 1280x720 at 60 Hz by default
// (CEA-861 timing: 74.25 MHz pixel clock, 1650 x 750 total, positive syncs).
// hcount and vcount run over the whole frame; active is high inside the
// 1280x720 picture; hsync and vsync are high during the sync pulses;
// new_frame pulses for one cycle at the first pixel of each frame and
// frame_count counts frames (the text-mode blink uses it). All outputs come
// straight from counters, with no extra latency.
// From the Orca report: 1280x720 at about 74 MHz.
// Own choices: the standard 720p60 porches and sync widths (1650x750
// total).
module video_sig_gen #(
  parameter int ACTIVE_H = 1280, H_FP = 110, H_SYNC = 40, H_BP = 220,
  parameter int ACTIVE_V = 720,  V_FP = 5,   V_SYNC = 5,  V_BP = 20,
  localparam int H_TOTAL = ACTIVE_H + H_FP + H_SYNC + H_BP,
  localparam int V_TOTAL = ACTIVE_V + V_FP + V_SYNC + V_BP
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        active,
  output logic        new_frame,
  output logic [5:0]  frame_count
);
  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0; vcount <= '0; frame_count <= '0;
    end else if (hcount == 11'(H_TOTAL - 1)) begin
      hcount <= '0;
      if (vcount == 10'(V_TOTAL - 1)) begin
        vcount <= '0;
        frame_count <= frame_count + 6'd1;
      end else vcount <= vcount + 10'd1;
    end else hcount <= hcount + 11'd1;
  end

  assign active    = (hcount < 11'(ACTIVE_H)) && (vcount < 10'(ACTIVE_V));
  assign hsync     = (hcount >= 11'(ACTIVE_H + H_FP)) && (hcount < 11'(ACTIVE_H + H_FP + H_SYNC));
  assign vsync     = (vcount >= 10'(ACTIVE_V + V_FP)) && (vcount < 10'(ACTIVE_V + V_FP + V_SYNC));
  assign new_frame = (hcount == 11'd0) && (vcount == 10'd0);
endmodule
