// riscv_divider: fixed-latency, non-pipelined restoring divider for div,
// divu, rem and remu. A start pulse latches the operands; the magnitudes are
// divided one quotient bit per cycle for exactly 32 cycles after the load cycle, then done pulses
// for one cycle and result holds until the next start. Signs are applied at
// the end. Division by zero gives quotient all ones and remainder equal to the
// dividend, and the signed overflow case (-2^31 / -1) gives -2^31 and 0, as the
// RISC-V specification requires.
// From the Orca report: fixed 32-cycle non-pipelined division.
// Own choices: restoring algorithm with a setup cycle; RISC-V results for
// divide by zero and overflow.
module riscv_divider #(
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  input  logic             is_signed,
  input  logic             want_rem,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] result
);
  localparam int CW = $clog2(WIDTH + 1);
  logic [WIDTH-1:0] quo, div_m, dvd_orig;
  logic [WIDTH:0]   rem;
  logic [CW-1:0]    cnt;
  logic             neg_q, neg_r, by_zero, rem_sel;
  logic [WIDTH:0]   trial;
  logic [WIDTH-1:0] q_final, r_final;

  assign result = rem_sel ? r_final : q_final;
  assign trial = {rem[WIDTH-1:0], quo[WIDTH-1]} - {1'b0, div_m};

  always_comb begin
    q_final = neg_q ? -quo : quo;
    r_final = neg_r ? -rem[WIDTH-1:0] : rem[WIDTH-1:0];
    if (by_zero) begin
      q_final = '1;
      r_final = dvd_orig;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      quo <= '0; rem <= '0; div_m <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0;
      neg_q <= 1'b0; neg_r <= 1'b0; by_zero <= 1'b0; rem_sel <= 1'b0; dvd_orig <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        quo      <= (is_signed && dividend[WIDTH-1]) ? -dividend : dividend;
        div_m    <= (is_signed && divisor[WIDTH-1]) ? -divisor : divisor;
        rem      <= '0;
        neg_q    <= is_signed && (dividend[WIDTH-1] ^ divisor[WIDTH-1]);
        neg_r    <= is_signed && dividend[WIDTH-1];
        by_zero  <= (divisor == '0);
        dvd_orig <= dividend;
        rem_sel  <= want_rem;
        cnt      <= CW'(WIDTH);
        busy     <= 1'b1;
      end else if (busy) begin
        if (!trial[WIDTH]) begin
          rem <= {1'b0, trial[WIDTH-1:0]};
          quo <= {quo[WIDTH-2:0], 1'b1};
        end else begin
          rem <= {rem[WIDTH-1:0], quo[WIDTH-1]};
          quo <= {quo[WIDTH-2:0], 1'b0};
        end
        cnt <= cnt - CW'(1);
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
