// tb_orca_top: end-to-end test of the whole microcomputer at its default
// parameters (50 MHz CPU clock, 74.25 MHz pixel clock, 115200-baud loader).
// A program assembled here is sent over the serial line with 'W' commands
// and started with 'S'. It draws two character cells, encrypts the FIPS-197
// C.1 block with the AES co-processor and decrypts it again, divides and
// multiplies, times a delay loop with COUNTER, samples ENTROPY twice, waits
// for two PS/2 scancodes typed by a keyboard model and clears the keyboard
// buffer, then stores an end marker. The testbench checks every stored result,
// the rendered pixels of the two cells in a following frame, halting and
// single-stepping from the debug inputs, a fast burst of keyboard frames that
// overflows the scancode buffer (plus one frame with bad parity), and the 'H'
// and 'R' commands, and the seven-segment digit showing the debug register.
// It counts each pipeline and peripheral mechanism and fails
// any that never occurred.
// Reference values come from FIPS-197, hand-worked arithmetic and the
// report's memory map; command bytes and baud rate are design choices.
module tb_orca_top;
  import tb_rv_asm_pkg::*;
  import orca_pkg::*;
  localparam int CPB = 434;
  logic clk = 0, clk_pixel = 0, rst = 1, uart_rx = 1, ps2_clk = 1, ps2_data = 1;
  logic halt_sw = 0, step_btn = 0;
  logic [4:0] dbg_reg_sel = 5'd1;
  dbg_t dbg;
  logic [2:0] dbg_view = 3'd6;
  logic [7:0] seg_an;
  logic [6:0] seg_cat;
  logic [23:0] rgb;
  logic hsync, vsync, de;
  int checks = 0, failures = 0;

  orca_top dut (.*);
  always #10 clk = ~clk;            // 50 MHz
  always #6.734 clk_pixel = ~clk_pixel;   // 74.25 MHz

  // ---------------- mechanism counters ----------------
  int n_load, n_div, n_use, n_miss, n_annul, n_byp, n_ret, n_prog_we, n_aes_enc, n_aes_dec,
      n_aes_term, n_kbd, n_kbd_clear, n_step, n_vid_fg, n_vid_bg, n_kbd_ovf, n_kbd_err;
  always @(posedge clk) if (!rst) begin
    n_load  += int'(dut.u_core.ev_stall_load);
    n_div   += int'(dut.u_core.ev_stall_div);
    n_use   += int'(dut.u_core.ev_stall_use);
    n_miss  += int'(dut.u_core.ev_icache_miss);
    n_annul += int'(dut.u_core.ev_annul);
    n_byp   += int'(dut.u_core.ev_bypass);
    n_ret   += int'(dut.u_core.ev_retire);
    n_prog_we += int'(dut.prog_we);
    n_aes_enc += int'(dut.u_aes.core_start_enc);
    n_aes_dec += int'(dut.u_aes.core_start_dec);
    n_aes_term += int'(dut.u_aes.st == dut.u_aes.RD_DWORD_2 && dut.u_aes.cop_rdata == 32'hDEADBEEF);
    n_kbd   += int'(dut.kbd_valid);
    n_kbd_clear += int'(dut.dev == DEV_KBD_CTRL && dut.dev_we);
    n_kbd_ovf += int'(dut.kbd_overflow);
    n_kbd_err += int'(dut.kbd_err);
    n_step  += int'(dut.step && dut.core_halt);
  end

  initial begin
    #200ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- program ----------------
  logic [31:0] prog [$];
  task automatic emit(input logic [31:0] w); prog.push_back(w); endtask
  task automatic li(input int rd, input logic [31:0] v);
    logic [31:0] hi; hi = v + 32'h800;
    emit(lui(rd, int'(hi[31:12])));
    emit(addi(rd, rd, int'({{20{v[11]}}, v[11:0]})));
  endtask
  function automatic int here(); return prog.size(); endfunction
  function automatic int back(input int target); return (target - prog.size()) * 4; endfunction

  task automatic build();
    int poll;
    logic [31:0] pt [4] = '{32'h33221100, 32'h77665544, 32'hBBAA9988, 32'hFFEEDDCC};
    emit(lui(1, 'h40));            // AES input buffer
    emit(lui(2, 'h4F));            // AES control
    emit(addi(3, 0, 'h400));       // results
    emit(lui(4, 'h20));            // video memory
    li(5, 32'h1E42_1E41);          // 'A','B' yellow on blue
    emit(sw(5, 4, 0));
    for (int i = 0; i < 4; i++) begin li(6, pt[i]); emit(sw(6, 1, 4 * i)); end
    li(6, 32'hDEADBEEF); emit(sw(6, 1, 16));
    emit(addi(6, 0, 1)); emit(sw(6, 2, 0));          // encrypt
    poll = here();
    emit(lw(7, 2, 0)); emit(andi(7, 7, 4)); emit(beq(7, 0, back(poll)));
    emit(addi(8, 1, 'h404));
    for (int i = 0; i < 4; i++) begin emit(lw(9, 8, 4 * i)); emit(sw(9, 3, 4 * i)); emit(sw(9, 1, 4 * i)); end
    emit(addi(6, 0, 2)); emit(sw(6, 2, 0));          // decrypt
    poll = here();
    emit(lw(7, 2, 0)); emit(andi(7, 7, 4)); emit(beq(7, 0, back(poll)));
    for (int i = 0; i < 4; i++) begin emit(lw(9, 8, 4 * i)); emit(sw(9, 3, 16 + 4 * i)); end
    emit(addi(10, 0, -100)); emit(addi(11, 0, 7));
    emit(div(12, 10, 11)); emit(sw(12, 3, 32));
    emit(mul(13, 10, 11)); emit(sw(13, 3, 36));
    emit(lui(14, 'h10));                              // COUNTER / ENTROPY
    emit(lw(15, 14, 0));
    emit(addi(16, 0, 100));
    poll = here();
    emit(addi(16, 16, -1)); emit(bne(16, 0, back(poll)));
    emit(lw(17, 14, 0)); emit(sub(18, 17, 15)); emit(sw(18, 3, 40));
    emit(lw(19, 14, 4)); emit(lw(20, 14, 4)); emit(xor_(21, 19, 20)); emit(sw(21, 3, 44));
    emit(lui(22, 'h30)); emit(addi(23, 22, 'h80));   // keyboard
    emit(addi(25, 0, 2));
    poll = here();
    emit(lw(24, 23, 0)); emit(srli(24, 24, 1)); emit(blt(24, 25, back(poll)));
    emit(lw(26, 22, 0)); emit(sw(26, 3, 48));
    emit(sw(0, 23, 0)); emit(lw(27, 23, 0)); emit(sw(27, 3, 52));
    emit(addi(28, 0, 'h5A)); emit(sw(28, 3, 60));    // end marker
    emit(addi(1, 0, 77));                             // x1 = 77 for the debugger
    emit(jal(0, 0));
  endtask

  // ---------------- serial and keyboard drivers ----------------
  task automatic uart_byte(input logic [7:0] b);
    uart_rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rx = b[i]; repeat (CPB) @(posedge clk); end
    uart_rx = 1; repeat (CPB) @(posedge clk);
  endtask
  task automatic uart_word(input logic [31:0] a, input logic [31:0] d);
    uart_byte(8'h57);
    for (int i = 0; i < 4; i++) uart_byte(a[8*i +: 8]);
    for (int i = 0; i < 4; i++) uart_byte(d[8*i +: 8]);
  endtask
  // q is a quarter of the PS/2 clock period in CPU cycles (1000 gives a
  // 12.5 kHz keyboard clock); bad_parity sends even parity
  task automatic ps2_frame(input logic [7:0] b, input int q = 1000, input logic bad_parity = 0);
    logic [10:0] bits;
    bits = {1'b1, ~^b ^ bad_parity, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = bits[i]; repeat (q) @(posedge clk);
      ps2_clk = 0; repeat (2 * q) @(posedge clk);
      ps2_clk = 1; repeat (q) @(posedge clk);
    end
  endtask

  task automatic chk(input logic ok, input string w);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask
  task automatic chk_ev(input int n, input string w);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", w); end
    else $display("%-28s %0d", w, n);
  endtask
  function automatic logic [31:0] res(input int i); return dut.u_pmem.mem[('h400 >> 2) + i]; endfunction

  // ---------------- pixel checker ----------------
  // positions are counted from de; cell 0 is 'A' (0x41), cell 1 'B' (0x42),
  // attribute 0x1E: yellow (0xFFFF55) dots on blue (0x0000AA)
  logic check_video = 0;
  int px, py, vid_bad;
  logic de_q;
  always @(posedge clk_pixel) begin
    de_q <= de;
    if (vsync) begin px <= 0; py <= 0; end
    else if (de) px <= px + 1;
    else if (de_q) begin px <= 0; py <= py + 1; end
    if (check_video && de && px < 16 && py < 16) begin
      logic [7:0] ch, dots;
      logic [23:0] exp;
      ch = (px < 8) ? 8'h41 : 8'h42;
      dots = (py == 0 || py == 15) ? 8'h00 : ch;
      exp = dots[7 - px % 8] ? 24'hFFFF55 : 24'h0000AA;
      if (dots[7 - px % 8]) n_vid_fg++; else n_vid_bg++;
      if (rgb !== exp) vid_bad++;
    end
  end

  initial begin
    int cyc;
    logic [31:0] frozen [3];
    n_load = 0; n_div = 0; n_use = 0; n_miss = 0; n_annul = 0; n_byp = 0; n_ret = 0;
    n_prog_we = 0; n_aes_enc = 0; n_aes_dec = 0; n_aes_term = 0; n_kbd = 0; n_kbd_clear = 0;
    n_step = 0; n_kbd_ovf = 0; n_kbd_err = 0; n_vid_fg = 0; n_vid_bg = 0; vid_bad = 0; px = 0; py = 0;
    build();
    $display("program: %0d words", prog.size());
    repeat (10) @(posedge clk); rst = 0;
    repeat (10) @(posedge clk);
    chk(dbg.halted, "halted after reset");
    foreach (prog[i]) uart_word(32'(4 * i), prog[i]);
    foreach (prog[i]) chk(dut.u_pmem.mem[i] == prog[i], "program word stored");
    uart_byte(8'h53);   // 'S'
    // halt and single-step from the debug inputs while the AES unit works
    repeat (300) @(posedge clk);
    halt_sw = 1; repeat (5) @(posedge clk);
    frozen[0] = dbg.pc_if; frozen[1] = dbg.pc_ex; frozen[2] = dbg.pc_wb;
    repeat (50) @(posedge clk);
    chk(dbg.pc_if == frozen[0] && dbg.pc_ex == frozen[1] && dbg.pc_wb == frozen[2], "frozen while halted");
    for (int s = 0; s < 6; s++) begin
      step_btn = 1; repeat (5) @(posedge clk); step_btn = 0; repeat (5) @(posedge clk);
    end
    chk(n_step == 6, "six single steps");
    halt_sw = 0;
    fork
      begin repeat (20000) @(posedge clk); ps2_frame(8'h1C); ps2_frame(8'hF0); end
    join_none
    cyc = 0;
    while (res(15) !== 32'h5A && cyc < 2000000) begin @(posedge clk); cyc++; end
    chk(res(15) == 32'h5A, "program finished");
    chk(res(0) == 32'hd8e0c469 && res(1) == 32'h30047b6a && res(2) == 32'h80b7cdd8 && res(3) == 32'h5ac5b470, "AES encrypt (FIPS-197 C.1)");
    chk(res(4) == 32'h33221100 && res(5) == 32'h77665544 && res(6) == 32'hBBAA9988 && res(7) == 32'hFFEEDDCC, "AES decrypt");
    chk(res(8) == -14, "div");
    chk(res(9) == -700, "mul");
    chk(res(10) >= 4 && res(10) <= 20, $sformatf("COUNTER advanced %0d us over the delay loop", res(10)));
    chk(res(11) != 0, "ENTROPY changes");
    chk(res(12)[15:0] == 16'hF01C, "keyboard scancodes");
    chk(res(13) == 0, "keyboard cleared");
    // video: let one complete frame pass with the cells drawn
    @(posedge vsync); @(negedge vsync);
    check_video = 1;
    @(posedge vsync);
    check_video = 0;
    chk(vid_bad == 0 && n_vid_fg > 0 && n_vid_bg > 0, $sformatf("cell pixels (%0d wrong)", vid_bad));
    // keyboard burst from a fast keyboard model: one frame with bad parity is
    // dropped, then 130 codes overflow the 127-code buffer
    ps2_frame(8'h55, 10, 1'b1);
    for (int k = 0; k < 130; k++) ps2_frame(8'(k), 10);
    repeat (100) @(posedge clk);
    chk(dut.u_kbd.ctrl == {7'd127, 1'b1}, "keyboard count saturates at 127");
    chk(n_kbd_ovf == 3, $sformatf("three codes dropped (%0d)", n_kbd_ovf));
    chk(n_kbd_err == 1, "bad parity frame flagged");
    // debugger register view, then 'H' and 'R' over the serial line
    repeat (10) @(posedge clk);
    chk(dbg.reg_data == 77, "debug register view");
    begin : seg_view
      // view 6 shows the register: the lit digit carries its nibble of 77
      logic [6:0] pat [16] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12, 7'h02, 7'h78,
                               7'h00, 7'h10, 7'h08, 7'h03, 7'h46, 7'h21, 7'h06, 7'h0E};
      int k; k = 0;
      for (int i = 0; i < 8; i++) if (!seg_an[i]) k = i;
      chk($countones(~seg_an) == 1 && seg_cat == pat[(32'd77 >> (4 * k)) & 15], "seven-segment register view");
    end
    uart_byte(8'h48);
    chk(dbg.halted, "'H' halts");
    uart_byte(8'h52);
    repeat (3) @(posedge clk);
    chk(dbg.pc_if == 0 && dbg.reg_data == 0, "'R' resets pc and registers");
    chk_ev(n_load, "load stalls");
    chk_ev(n_div, "divide stalls");
    chk_ev(n_use, "load-to-use stalls");
    chk_ev(n_miss, "icache misses");
    chk_ev(n_annul, "branch annuls");
    chk_ev(n_byp, "bypasses");
    chk_ev(n_ret, "instructions retired");
    chk_ev(n_prog_we, "programmer writes");
    chk_ev(n_step, "single steps");
    chk_ev(n_aes_enc, "AES encryptions");
    chk_ev(n_aes_dec, "AES decryptions");
    chk_ev(n_aes_term, "AES terminator stops");
    chk_ev(n_kbd, "PS/2 scancodes");
    chk_ev(n_kbd_clear, "keyboard clears");
    chk_ev(n_kbd_ovf, "keyboard overflows");
    chk_ev(n_kbd_err, "PS/2 frame errors");
    chk_ev(n_vid_fg, "foreground pixels");
    chk_ev(n_vid_bg, "background pixels");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
