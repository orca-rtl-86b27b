// tb_seven_seg_debug: for every view setting, loads random debug values,
// watches the display for a full scan and decodes each lit digit back to a
// hex nibble; the eight nibbles must form the selected value. Also checks that
// exactly one digit is enabled at a time and that each digit stays lit for
// SCAN_DIV cycles (reduced to 6 to keep the run short).
// Reference values come from the standard seven-segment patterns for 0-F
// written out independently here; the view encoding is this design's choice.
module tb_seven_seg_debug;
  import orca_pkg::*;
  localparam int DIV = 6;
  logic clk = 0, rst = 1;
  logic [2:0] view = 0;
  dbg_t dbg;
  logic [7:0] an;
  logic [6:0] seg;
  int checks = 0, failures = 0;
  seven_seg_debug #(.SCAN_DIV(DIV)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // active-low {g..a} patterns, in the order the display manuals draw them
  function automatic int decode(input logic [6:0] s);
    logic [6:0] pat [16] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12, 7'h02, 7'h78,
                             7'h00, 7'h10, 7'h08, 7'h03, 7'h46, 7'h21, 7'h06, 7'h0E};
    for (int i = 0; i < 16; i++) if (pat[i] === s) return i;
    return -1;
  endfunction
  function automatic int lit(input logic [7:0] a);
    for (int i = 0; i < 8; i++) if (a === ~(8'd1 << i)) return i;
    return -1;
  endfunction
  initial begin
    logic [31:0] exp, got;
    int d, run, prev;
    dbg = '0;
    repeat (3) @(posedge clk); rst <= 0;
    for (int v = 0; v < 8; v++) begin
      dbg = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, 1'b1};
      view = 3'(v);
      unique case (v)
        0: exp = dbg.pc_if;   1: exp = dbg.pc_id;  2: exp = dbg.pc_ex;  3: exp = dbg.pc_mem;
        4: exp = dbg.pc_wb;   5: exp = dbg.instr_id; default: exp = dbg.reg_data;
      endcase
      repeat (2) @(posedge clk);
      got = 'x; prev = -1; run = 0;
      // watch two full scans; record every digit and time each complete dwell
      for (int c = 0; c < 16 * DIV; c++) begin
        @(negedge clk);
        d = lit(an);
        checks++;
        if (d < 0) begin failures++; $display("FAIL an=%b", an); continue; end
        if (decode(seg) < 0) begin failures++; $display("FAIL seg=%b", seg); end
        else got[4*d +: 4] = 4'(decode(seg));
        if (d == prev) run++;
        else begin
          // the first dwell of each view starts mid-way, so it is not timed
          if (prev >= 0 && run != c) begin
            checks++;
            if (run != DIV) begin failures++; $display("FAIL dwell %0d", run); end
          end
          prev = d; run = 1;
        end
      end
      checks++;
      if (got !== exp) begin failures++; $display("FAIL view %0d shows %08h exp %08h", v, got, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
