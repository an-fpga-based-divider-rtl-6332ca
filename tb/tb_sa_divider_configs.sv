// Runs the divider in the four operand configurations of the evaluation:
// 16-bit by 16-bit, 32-bit by 32-bit, 64-bit by 32-bit and 256-bit by
// 128-bit, each built at exactly that size (the first two have equal
// dividend and divisor widths). Each configuration gets random divisions
// of all operand lengths, and the largest iteration count, reached by
// all-ones divided by 1, must equal the 2*(N-1)+1 bound of this design.
module tb_sa_divider_configs;
  logic clk = 1'b0;
  logic rst_n = 1'b0;

  always #5 clk = ~clk;

  localparam int K = 4;
  localparam int WIDTHS[K] = '{16, 32, 64, 256};
  int   c[K], f[K], it[K];
  logic fin[K];

  tb_sa_div_runner #(.N(16),  .M(16),  .COUNT(300)) r16  (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .max_iters(it[0]), .finished(fin[0]));
  tb_sa_div_runner #(.N(32),  .M(32),  .COUNT(300)) r32  (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .max_iters(it[1]), .finished(fin[1]));
  tb_sa_div_runner #(.N(64),  .M(32),  .COUNT(300)) r64  (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .max_iters(it[2]), .finished(fin[2]));
  tb_sa_div_runner #(.N(256), .M(128), .COUNT(200)) r256 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .max_iters(it[3]), .finished(fin[3]));

  int checks, failures;

  initial begin
    repeat (1000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    checks = c.sum();
    failures = f.sum();
    // all-ones / 1 is the worst case: two steps per quotient bit but the last
    foreach (it[k]) begin
      checks++;
      if (it[k] != 2 * (WIDTHS[k] - 1) + 1) begin
        failures++;
        $display("FAIL: worst case of the %0d-bit build took %0d iterations", WIDTHS[k], it[k]);
      end
    end
    $display("largest iteration counts: 16/16 %0d, 32/32 %0d, 64/32 %0d, 256/128 %0d",
             it[0], it[1], it[2], it[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
