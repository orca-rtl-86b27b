// riscv_core: five-stage RV32IM pipeline (IF, ID, EX, MEM, WB).
//
// IF   fetches from riscv_icache at pc; the next pc is pc+4 (branches are
//      predicted not taken).
// ID   decodes, reads the register file and bypasses from EX, MEM and WB,
//      taking the youngest producer first.
// EX   runs riscv_alu (single-cycle multiply), resolves branches and jumps and
//      starts riscv_divider for div/divu/rem/remu.
// MEM  issues loads and stores through riscv_lsu on the data bus.
// WB   writes the register file.
//
// Each stage can be held or annulled on its own:
//   load wait      a load in MEM holds IF..MEM for 2 cycles (read latency of
//                  the bus); WB receives a bubble.
//   division       a divide in EX holds IF..EX until the 32-cycle divider is
//                  done; MEM receives bubbles.
//   load-to-use    a load in EX or MEM whose rd is a source of the ID
//                  instruction holds IF and ID; EX receives a bubble.
//   icache miss    holds IF; ID receives a bubble.
//   taken branch   a taken branch or any jump in EX annuls ID and IF and
//                  redirects the pc.
// Halting mode: while halt is high the whole pipeline (and any store) is
// frozen except in a cycle where step is high, so step pulses advance it one
// cycle at a time. The debug outputs give the pc of every stage, the ID
// instruction and any register.
// Data bus: dmem_re/dmem_we with a word address, byte enables and write data;
// read data is returned two cycles after the address is first presented and
// the address is held for the whole load. Stores complete in one cycle.
// Instructions such as fence, ecall, ebreak and CSR accesses execute as no-ops.
// From the Orca report: five stages, full bypass into ID, the stall/annul
// scheme of each hazard, predict-not-taken, halting mode.
// Own choices: branch resolution in EX, two-cycle load wait, no-op decoding
// of system instructions, step semantics.
module riscv_core
  import riscv_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        halt,
  input  logic        step,
  // instruction memory port (read latency 2)
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  // data bus (read latency 2)
  output logic        dmem_re,
  output logic        dmem_we,
  output logic [31:0] dmem_addr,
  output logic [3:0]  dmem_be,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata,
  // debugger
  input  logic [4:0]  dbg_reg_sel,
  output logic [31:0] dbg_reg_data,
  output logic [31:0] dbg_pc_if, dbg_pc_id, dbg_pc_ex, dbg_pc_mem, dbg_pc_wb,
  output logic [31:0] dbg_instr_id,
  // event strobes for performance counting and tests
  output logic        ev_retire,
  output logic        ev_stall_load,
  output logic        ev_stall_div,
  output logic        ev_stall_use,
  output logic        ev_icache_miss,
  output logic        ev_annul,
  output logic        ev_bypass
);
  logic en;
  assign en = !halt || step;

  // ---------------- pipeline registers ----------------
  logic [31:0] pc;
  logic        id_valid;  logic [31:0] id_pc, id_instr;
  logic        ex_valid;  logic [31:0] ex_pc, ex_rs1v, ex_rs2v;  ctl_t ex_ctl;
  logic        mem_valid; logic [31:0] mem_pc, mem_result, mem_rs2v; ctl_t mem_ctl;
  logic        wb_valid;  logic [31:0] wb_pc, wb_value; logic [4:0] wb_rd; logic wb_we;
  logic [1:0]  ld_cnt;

  // ---------------- IF ----------------
  logic        ic_hit;
  logic [31:0] ic_instr;
  riscv_icache u_icache (
    .clk, .rst, .req(1'b1), .pc, .hit(ic_hit), .instr(ic_instr),
    .mem_addr(imem_addr), .mem_rdata(imem_rdata)
  );

  // ---------------- ID ----------------
  ctl_t        id_ctl;
  logic [31:0] rf_rd1, rf_rd2, id_rs1v, id_rs2v;
  riscv_decode u_dec (.instr(id_instr), .ctl(id_ctl));
  riscv_regfile u_rf (
    .clk, .rst, .ra1(id_ctl.rs1), .ra2(id_ctl.rs2), .ra3(dbg_reg_sel),
    .rd1(rf_rd1), .rd2(rf_rd2), .rd3(dbg_reg_data),
    .we(wb_valid && wb_we && en), .wa(wb_rd), .wd(wb_value)
  );

  // ---------------- EX ----------------
  logic [31:0] alu_a, alu_b, alu_y, ex_result, ex_target, div_result;
  logic        br_taken, div_busy, div_done, div_ready, div_start;
  riscv_alu u_alu (
    .a(alu_a), .b(alu_b), .op(ex_ctl.alu_op), .y(alu_y),
    .cmp_a(ex_rs1v), .cmp_b(ex_rs2v), .br_op(ex_ctl.br_op), .taken(br_taken)
  );
  riscv_divider u_div (
    .clk, .rst, .start(div_start), .dividend(ex_rs1v), .divisor(ex_rs2v),
    .is_signed(ex_ctl.alu_op inside {ALU_DIV, ALU_REM}),
    .want_rem(ex_ctl.alu_op inside {ALU_REM, ALU_REMU}),
    .busy(div_busy), .done(div_done), .result(div_result)
  );

  always_comb begin
    unique case (ex_ctl.asel)
      ASEL_PC:   alu_a = ex_pc;
      ASEL_ZERO: alu_a = 32'h0;
      default:   alu_a = ex_rs1v;
    endcase
    alu_b = (ex_ctl.bsel == BSEL_IMM) ? ex_ctl.imm : ex_rs2v;
    unique case (ex_ctl.wb_sel)
      WB_PC4:  ex_result = ex_pc + 32'd4;
      default: ex_result = ex_ctl.is_div ? div_result : alu_y;
    endcase
    unique case (ex_ctl.br_op)
      BR_JALR: ex_target = (ex_rs1v + ex_ctl.imm) & ~32'h1;
      default: ex_target = ex_pc + ex_ctl.imm;
    endcase
  end

  // ---------------- MEM ----------------
  logic [31:0] lsu_load;
  logic [3:0]  lsu_be;
  logic [31:0] lsu_wdata;
  riscv_lsu u_lsu (
    .addr(mem_result), .funct3(mem_ctl.mem_funct3), .store_data(mem_rs2v),
    .be(lsu_be), .wdata(lsu_wdata), .rdata(dmem_rdata), .load_data(lsu_load)
  );
  assign dmem_re    = mem_valid && mem_ctl.mem_re;
  assign dmem_we    = mem_valid && mem_ctl.mem_we && en;
  assign dmem_addr  = mem_result;
  assign dmem_be    = lsu_be;
  assign dmem_wdata = lsu_wdata;

  // ---------------- hazards ----------------
  logic stall_mem, stall_div, stall_use, ex_hold, id_hold, redirect;
  logic ex_is_load_hit, mem_is_load_hit;

  function automatic logic src_match(input ctl_t c, input logic [4:0] rd);
    return (rd != 5'd0) && ((c.uses_rs1 && c.rs1 == rd) || (c.uses_rs2 && c.rs2 == rd));
  endfunction

  assign stall_mem = mem_valid && mem_ctl.mem_re && (ld_cnt != 2'd2);
  assign stall_div = ex_valid && ex_ctl.is_div && !div_ready;
  assign div_start = ex_valid && ex_ctl.is_div && !div_busy && !div_ready && !div_done && en;
  assign ex_is_load_hit  = ex_valid && ex_ctl.mem_re && src_match(id_ctl, ex_ctl.rd);
  assign mem_is_load_hit = mem_valid && mem_ctl.mem_re && src_match(id_ctl, mem_ctl.rd);
  assign stall_use = id_valid && (ex_is_load_hit || mem_is_load_hit);
  assign ex_hold   = stall_mem || stall_div;
  assign id_hold   = ex_hold || stall_use;
  assign redirect  = ex_valid && br_taken && !ex_hold;

  // ---------------- bypass into ID ----------------
  function automatic logic [31:0] bypass(input logic [4:0] r, input logic [31:0] rf_val,
                                         output logic used);
    used = 1'b1;
    if (r == 5'd0) begin used = 1'b0; return 32'h0; end
    if (ex_valid && ex_ctl.reg_we && ex_ctl.rd == r)   return ex_result;
    if (mem_valid && mem_ctl.reg_we && mem_ctl.rd == r) return mem_result;
    if (wb_valid && wb_we && wb_rd == r)               return wb_value;
    used = 1'b0;
    return rf_val;
  endfunction

  logic byp1, byp2;
  always_comb begin
    id_rs1v = bypass(id_ctl.rs1, rf_rd1, byp1);
    id_rs2v = bypass(id_ctl.rs2, rf_rd2, byp2);
  end

  // ---------------- sequential ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      div_ready <= 1'b0;
    end else if (div_done) begin
      div_ready <= 1'b1;
    end else if (en && !ex_hold) begin
      div_ready <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc <= RESET_PC;
      id_valid <= 1'b0;  id_pc <= '0;  id_instr <= '0;
      ex_valid <= 1'b0;  ex_pc <= '0;  ex_rs1v <= '0; ex_rs2v <= '0; ex_ctl <= '0;
      mem_valid <= 1'b0; mem_pc <= '0; mem_result <= '0; mem_rs2v <= '0; mem_ctl <= '0;
      wb_valid <= 1'b0;  wb_pc <= '0;  wb_value <= '0; wb_rd <= '0; wb_we <= 1'b0;
      ld_cnt <= '0;
    end else if (en) begin
      // MEM -> WB
      if (stall_mem) begin
        wb_valid <= 1'b0;
        ld_cnt   <= ld_cnt + 2'd1;
      end else begin
        wb_valid <= mem_valid;
        wb_pc    <= mem_pc;
        wb_rd    <= mem_ctl.rd;
        wb_we    <= mem_ctl.reg_we;
        wb_value <= (mem_ctl.wb_sel == WB_MEM) ? lsu_load : mem_result;
        ld_cnt   <= '0;
      end
      // EX -> MEM
      if (!ex_hold) begin
        mem_valid  <= ex_valid;
        mem_pc     <= ex_pc;
        mem_ctl    <= ex_ctl;
        mem_result <= (ex_ctl.mem_re || ex_ctl.mem_we) ? alu_y : ex_result;
        mem_rs2v   <= ex_rs2v;
      end else if (!stall_mem) begin
        mem_valid <= 1'b0;
      end
      // ID -> EX
      if (!id_hold) begin
        ex_valid <= id_valid && !redirect;
        ex_pc    <= id_pc;
        ex_ctl   <= id_ctl;
        ex_rs1v  <= id_rs1v;
        ex_rs2v  <= id_rs2v;
      end else if (!ex_hold) begin
        ex_valid <= 1'b0;
      end
      // IF -> ID
      if (redirect) begin
        id_valid <= 1'b0;
      end else if (!id_hold) begin
        id_valid <= ic_hit;
        id_pc    <= pc;
        id_instr <= ic_instr;
      end
      // pc
      if (redirect)               pc <= ex_target;
      else if (!id_hold && ic_hit) pc <= pc + 32'd4;
    end
  end

  // ---------------- debug and events ----------------
  assign dbg_pc_if    = pc;
  assign dbg_pc_id    = id_pc;
  assign dbg_pc_ex    = ex_pc;
  assign dbg_pc_mem   = mem_pc;
  assign dbg_pc_wb    = wb_pc;
  assign dbg_instr_id = id_instr;

  assign ev_retire      = en && wb_valid;
  assign ev_stall_load  = en && stall_mem;
  assign ev_stall_div   = en && stall_div;
  assign ev_stall_use   = en && stall_use && !ex_hold;
  assign ev_icache_miss = en && !ic_hit && !id_hold && !redirect;
  assign ev_annul       = en && redirect;
  assign ev_bypass      = en && id_valid && !id_hold && ((byp1 && id_ctl.uses_rs1) || (byp2 && id_ctl.uses_rs2));

  // A store never coincides with a load on the data bus.
  assert property (@(posedge clk) disable iff (rst) !(dmem_re && dmem_we));
endmodule
