// tb_riscv_core: runs a hand-assembled program on the pipeline with a
// memory model of two-cycle read latency. The program exercises forwarding,
// a load-to-use stall, multiply, divide/remainder (32-cycle stalls), byte
// stores and loads, a taken loop branch, jal/jalr and a taken forward branch
// whose shadow must be annulled. Results stored to memory are compared with
// values worked out by hand; each hazard mechanism must occur at least once;
// the halting mode must freeze the pipeline and single steps must advance it.
// Reference values come from the RV32IM specification and hand-worked
// results; the stall mechanisms are those the report lists.
module tb_riscv_core;
  import tb_rv_asm_pkg::*;
  logic clk = 0, rst = 1, halt = 0, step = 0;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic dmem_re, dmem_we;
  logic [3:0] dmem_be;
  logic [4:0] dbg_reg_sel = 5'd13;
  logic [31:0] dbg_reg_data, dbg_pc_if, dbg_pc_id, dbg_pc_ex, dbg_pc_mem, dbg_pc_wb, dbg_instr_id;
  logic ev_retire, ev_stall_load, ev_stall_div, ev_stall_use, ev_icache_miss, ev_annul, ev_bypass;
  int checks = 0, failures = 0;
  int n_load, n_div, n_use, n_miss, n_annul, n_byp, n_ret;

  riscv_core dut (.*);
  always #5 clk = ~clk;

  logic [31:0] mem [1024];
  logic [31:0] ia1, ia2, da1;
  always_ff @(posedge clk) begin
    ia1 <= mem[imem_addr[11:2]]; imem_rdata <= ia1;
    da1 <= mem[dmem_addr[11:2]]; dmem_rdata <= da1;
    if (dmem_we)
      for (int b = 0; b < 4; b++) if (dmem_be[b]) mem[dmem_addr[11:2]][8*b +: 8] <= dmem_wdata[8*b +: 8];
  end
  always @(posedge clk) if (!rst) begin
    n_load += int'(ev_stall_load); n_div += int'(ev_stall_div); n_use += int'(ev_stall_use);
    n_miss += int'(ev_icache_miss); n_annul += int'(ev_annul); n_byp += int'(ev_bypass);
    n_ret += int'(ev_retire);
  end

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int pc_i;
  task automatic emit(input logic [31:0] w); mem[pc_i] = w; pc_i++; endtask
  task automatic chk(input int idx, input logic [31:0] exp, input string w);
    checks++;
    if (mem[idx] !== exp) begin failures++; $display("FAIL %s: %08h exp %08h", w, mem[idx], exp); end
  endtask
  task automatic chk_ev(input int n, input string w);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", w); end
    else $display("%s: %0d", w, n);
  endtask

  initial begin
    int loop_i, func_i, call_i, br_i, cyc;
    logic [31:0] pc_frozen;
    n_load = 0; n_div = 0; n_use = 0; n_miss = 0; n_annul = 0; n_byp = 0; n_ret = 0;
    for (int i = 0; i < 1024; i++) mem[i] = 32'h0;
    pc_i = 0;
    emit(addi(1, 0, 5));
    emit(addi(2, 0, 7));
    emit(add(3, 1, 2));          // 12, bypass from EX and MEM
    emit(sub(4, 3, 1));          // 7
    emit(mul(5, 3, 4));          // 84
    emit(addi(6, 0, -100));
    emit(addi(7, 0, 7));
    emit(div(8, 6, 7));          // -14
    emit(rem(9, 6, 7));          // -2
    emit(divu(10, 6, 7));        // 613566742
    emit(sw(3, 0, 'h100));
    emit(sw(5, 0, 'h104));
    emit(sw(8, 0, 'h108));
    emit(sw(9, 0, 'h10c));
    emit(sw(10, 0, 'h110));
    emit(lw(11, 0, 'h104));
    emit(addi(12, 11, 1));       // load-to-use: 85
    emit(sw(12, 0, 'h114));
    emit(addi(13, 0, 0));
    emit(addi(14, 0, 10));
    loop_i = pc_i;
    emit(add(13, 13, 14));
    emit(addi(14, 14, -1));
    emit(bne(14, 0, (loop_i - pc_i) * 4));
    emit(sw(13, 0, 'h118));      // 55
    emit(addi(15, 0, -2));
    emit(sw(0, 0, 'h11c));
    emit(sb(15, 0, 'h11d));
    emit(lw(16, 0, 'h11c));      // 0x0000fe00
    emit(lb(17, 0, 'h11d));      // -2
    emit(lbu(18, 0, 'h11d));     // 254
    emit(sw(16, 0, 'h120));
    emit(sw(17, 0, 'h124));
    emit(sw(18, 0, 'h128));
    call_i = pc_i;
    emit(jal(19, 0));            // patched below
    emit(sw(20, 0, 'h12c));      // 33
    emit(sw(19, 0, 'h130));      // return address
    emit(mulh(21, 6, 6));        // 0
    emit(mulhu(22, 6, 7));       // 6
    emit(sw(21, 0, 'h134));
    emit(sw(22, 0, 'h138));
    emit(lui(23, 'h12345));
    emit(addi(23, 23, 'h678));
    emit(sw(23, 0, 'h13c));
    emit(addi(24, 0, 0));
    br_i = pc_i;
    emit(blt(6, 0, 12));         // taken, skips two instructions
    emit(sw(6, 0, 'h200));       // annulled store
    emit(addi(24, 24, 4));       // annulled
    emit(addi(25, 0, 2));
    emit(sw(24, 0, 'h140));      // 0
    emit(sw(25, 0, 'h144));      // 2
    emit(sw(1, 0, 'h3fc));       // end marker
    emit(jal(0, 0));             // spin
    func_i = pc_i;
    emit(addi(20, 0, 33));
    emit(jalr(0, 19, 0));
    mem[call_i] = jal(19, (func_i - call_i) * 4);

    repeat (3) @(posedge clk); rst <= 0;
    // freeze the core for a while once it is running
    repeat (40) @(posedge clk);
    halt <= 1; @(posedge clk);
    pc_frozen = dbg_pc_if;
    repeat (20) @(posedge clk);
    checks++;
    if (dbg_pc_if !== pc_frozen) begin failures++; $display("FAIL pc moved while halted"); end
    // single steps: the pipeline advances by at most one stage per step
    for (int s = 0; s < 30; s++) begin
      @(negedge clk); step = 1; @(negedge clk); step = 0;
      repeat (2) @(negedge clk);
    end
    checks++;
    if (dbg_pc_if == pc_frozen) begin failures++; $display("FAIL steps did not advance"); end
    halt <= 0;
    cyc = 0;
    while (mem[255] !== 32'd5 && cyc < 5000) begin @(posedge clk); cyc++; end
    repeat (5) @(posedge clk);
    chk(255, 5, "end marker");
    chk('h100/4, 12, "add");
    chk('h104/4, 84, "mul");
    chk('h108/4, -14, "div");
    chk('h10c/4, -2, "rem");
    chk('h110/4, 613566742, "divu");
    chk('h114/4, 85, "load-use");
    chk('h118/4, 55, "loop sum");
    chk('h11c/4, 32'h0000fe00, "sb");
    chk('h120/4, 32'h0000fe00, "lw after sb");
    chk('h124/4, -2, "lb");
    chk('h128/4, 254, "lbu");
    chk('h12c/4, 33, "jal/jalr");
    chk('h130/4, (call_i + 1) * 4, "link");
    chk('h134/4, 0, "mulh");
    chk('h138/4, 6, "mulhu");
    chk('h13c/4, 32'h12345678, "lui/addi");
    chk('h140/4, 0, "annulled shadow");
    chk('h200/4, 0, "annulled store");
    chk('h144/4, 2, "branch target");
    checks++;
    if (dbg_reg_data !== 32'd55) begin failures++; $display("FAIL debug register read %0d", dbg_reg_data); end
    chk_ev(n_load, "load stalls");
    chk_ev(n_div, "divide stalls");
    chk_ev(n_use, "load-use stalls");
    chk_ev(n_miss, "icache misses");
    chk_ev(n_annul, "branch annuls");
    chk_ev(n_byp, "bypasses");
    $display("retired %0d", n_ret);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
