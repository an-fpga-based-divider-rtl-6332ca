// Test driver for one divider configuration (helper of tb_sa_divider_configs).
//
// Instantiates the divider with the given operand widths, runs COUNT random
// divisions with operands of every length up to the full width (plus the
// all-ones corners), and checks quotient and remainder against / and %, and
// the latency against the replayed iteration count + 3. Reports its totals
// on the output ports and raises finished when all divisions are done.
module tb_sa_div_runner #(
  parameter int unsigned N     = 16,
  parameter int unsigned M     = 16,
  parameter int unsigned COUNT = 200
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   max_iters,
  output logic finished
);
  import tb_sa_ref_pkg::*;

  logic         start = 1'b0;
  logic [N-1:0] dividend = '0;
  logic [M-1:0] divisor = '0;
  logic         busy, done, div_by_zero;
  logic [N-1:0] quotient, remainder;

  sa_divider #(.N(N), .M(M)) dut (.*);

  task automatic divide(word_t y, word_t x);
    word_t rems[$];
    int cycles, iters;
    @(negedge clk);
    dividend = N'(y); divisor = M'(x); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done && cycles < 4 * N + 8) begin
      @(negedge clk);
      cycles++;
    end
    iters = ref_steps(y, x, rems);
    if (iters > max_iters) max_iters = iters;
    checks++;
    if (quotient !== N'(y / x) || remainder !== N'(y % x) || cycles != iters + 3) begin
      failures++;
      $display("FAIL N=%0d M=%0d: %h / %h -> q=%h r=%h after %0d cycles (exp %h %h, %0d)",
               N, M, y, x, quotient, remainder, cycles, y / x, y % x, iters + 3);
    end
  endtask

  initial begin
    checks = 0; failures = 0; max_iters = 0; finished = 1'b0;
    wait (rst_n);
    divide(word_t'({N{1'b1}}), word_t'(1));
    divide(word_t'({N{1'b1}}), word_t'({M{1'b1}}));
    divide(word_t'({N{1'b1}}), word_t'(3));
    for (int i = 0; i < COUNT; i++)
      divide(rand_len($urandom_range(0, N)), rand_len($urandom_range(1, M)));
    finished = 1'b1;
  end
endmodule
