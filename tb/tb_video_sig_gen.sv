// tb_video_sig_gen: runs two 720p frames and checks frame length
// (1650 x 750 pixel clocks), active pixels per frame, sync pulse widths and
// positions, and the new_frame strobe.
// Reference values come from standard 720p60 timing (the report gives only
// 1280x720 at about 74 MHz).
module tb_video_sig_gen;
  logic clk = 0, rst = 1, hsync, vsync, active, new_frame;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic [5:0] frame_count;
  int checks = 0, failures = 0;
  video_sig_gen dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (3000000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic ok, input string w);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask
  initial begin
    int act, hs, vs_lines, nf, cyc, first_hs;
    logic vs_prev;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    act = 0; hs = 0; vs_lines = 0; nf = 0; cyc = 0; first_hs = -1; vs_prev = 0;
    for (int i = 0; i < 1650 * 750; i++) begin
      chk(32'(hcount) === i % 1650 && 32'(vcount) === i / 1650, "counters");
      if (active) act++;
      if (hsync) begin hs++; if (first_hs < 0) first_hs = i; end
      if (vsync && hcount == 0) vs_lines++;
      if (new_frame) nf++;
      @(negedge clk);
    end
    chk(act === 1280 * 720, "active pixels");
    chk(hs === 40 * 750, "hsync width");
    chk(first_hs === 1280 + 110, "hsync position");
    chk(vs_lines === 5, "vsync lines");
    chk(nf === 1, "one new_frame per frame");
    chk(hcount === 0 && vcount === 0 && new_frame && frame_count === 1, "wrap to next frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
