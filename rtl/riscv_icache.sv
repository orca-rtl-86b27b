// riscv_icache: two-way set-associative instruction cache with one 32-bit
// word per line and SETS sets (32 by default, 64 instructions in all). The
// lookup is combinational: in the cycle the fetch address is presented, hit
// says whether instr is valid. On a miss the cache presents the address to the
// instruction port of program memory (read latency two cycles), writes the
// returned word into the least-recently-used way of the set, and the fetch
// hits on the following cycle, so a miss costs three cycles. One LRU bit per
// set names the way to replace; a hit or a fill points it at the other way.
// Reset invalidates every line. Stores to program memory are not snooped.
// From the Orca report: two ways, 32 sets, one-word lines, 3-cycle miss.
// Own choices: one LRU bit per set; combinational hit path.
module riscv_icache #(
  parameter int SETS = 32,
  localparam int IW = $clog2(SETS),
  localparam int TW = 30 - IW
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        req,
  input  logic [31:0] pc,
  output logic        hit,
  output logic [31:0] instr,
  output logic [31:0] mem_addr,
  input  logic [31:0] mem_rdata
);
  typedef enum logic [1:0] {C_IDLE, C_WAIT, C_FILL} cstate_e;
  cstate_e st;

  logic [TW-1:0] tags  [2][SETS];
  logic [31:0]   data  [2][SETS];
  logic          valid [2][SETS];
  logic          lru   [SETS];

  logic [IW-1:0] idx, miss_idx;
  logic [TW-1:0] tag, miss_tag;
  logic [31:0]   miss_addr;
  logic          hit0, hit1;

  assign idx  = pc[IW+1:2];
  assign tag  = pc[31:IW+2];
  assign hit0 = valid[0][idx] && tags[0][idx] == tag;
  assign hit1 = valid[1][idx] && tags[1][idx] == tag;
  assign hit  = hit0 || hit1;
  assign instr = hit1 ? data[1][idx] : data[0][idx];

  assign miss_idx = miss_addr[IW+1:2];
  assign miss_tag = miss_addr[31:IW+2];
  assign mem_addr = (st == C_IDLE) ? {pc[31:2], 2'b00} : miss_addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= C_IDLE;
      miss_addr <= '0;
      for (int w = 0; w < 2; w++)
        for (int s = 0; s < SETS; s++) valid[w][s] <= 1'b0;
      for (int s = 0; s < SETS; s++) lru[s] <= 1'b0;
    end else begin
      unique case (st)
        C_IDLE: begin
          if (req && hit) lru[idx] <= hit0;   // way 0 used: replace way 1 next
          else if (req) begin
            miss_addr <= {pc[31:2], 2'b00};
            st <= C_WAIT;
          end
        end
        C_WAIT: st <= C_FILL;
        C_FILL: begin
          valid[lru[miss_idx]][miss_idx] <= 1'b1;
          tags[lru[miss_idx]][miss_idx]  <= miss_tag;
          data[lru[miss_idx]][miss_idx]  <= mem_rdata;
          lru[miss_idx] <= !lru[miss_idx];
          st <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
