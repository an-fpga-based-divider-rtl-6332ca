// End-to-end testbench of the divider at its default size (256-bit dividend,
// 128-bit divisor).
//
// Runs the two worked examples (46 / 23 in two iterations; 29 / 3 in three
// iterations with partial remainders 17, 5, 2), corner cases (zero divisor,
// zero dividend, dividend below, equal to and one above the divisor, divisor
// 1 with an all-ones dividend) and random divisions at the operand sizes of
// the evaluation (16/16, 32/32, 64/32, 256/128 and 4/4, 16/8, 64/16, 128/64
// bits). Quotient and remainder are checked against / and %, the latency
// against iterations + 3 with the iteration count replayed by the reference
// step rule. Start pulses during a division and back-to-back starts are
// also exercised. Each mechanism of the loop is counted from the DUT's
// control signals and must occur at least once.
module tb_sa_divider;
  import tb_sa_ref_pkg::*;
  import sa_div_pkg::*;

  localparam int unsigned N = 256;
  localparam int unsigned M = 128;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [N-1:0] dividend = '0;
  logic [M-1:0] divisor = '0;
  logic         busy, done;
  logic [N-1:0] quotient, remainder;
  logic         div_by_zero;

  int checks = 0;
  int failures = 0;

  // Operand sizes (dividend bits, divisor bits) of the evaluation.
  localparam int SIZES[8][2] = '{'{16,16}, '{32,32}, '{64,32}, '{256,128},
                                 '{4,4}, '{16,8}, '{64,16}, '{128,64}};

  sa_divider dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters, from the DUT's control signals -------------
  int n_safe_step, n_unit_step, n_end_equal_len, n_end_shorter;
  int n_len_kept, n_div0, n_ignored_start, n_back_to_back, n_over_lemma;
  int prev_len;
  word_t step_rems[$];

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.state == ST_ITER) begin
      if (dut.step && dut.a_pos)                 n_safe_step++;
      if (dut.step && dut.a_zero)                n_unit_step++;
      if (!dut.step && dut.a_zero)               n_end_equal_len++;
      if (!dut.step && !dut.a_zero && !dut.a_pos) n_end_shorter++;
      if (dut.step && bits_of(word_t'(dut.y_new)) == bits_of(word_t'(dut.reg_r)))
        n_len_kept++;
      if (dut.step) step_rems.push_back(word_t'(dut.y_new));
    end
    if (start && busy) n_ignored_start++;
    if (start && done) n_back_to_back++;
    if (done && div_by_zero) n_div0++;
  end

  // ---- one division ----------------------------------------------------
  // Pulses start, waits for done, checks the result and the latency.
  // noise: also pulse start in the middle of the division.
  task automatic divide(word_t y, word_t x, bit noise = 0, output int iters);
    word_t rems[$];
    word_t exp_q, exp_r;
    int cycles;
    int n, m;
    @(negedge clk);
    dividend = N'(y); divisor = M'(x); start = 1'b1;
    step_rems.delete();
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin
      if (noise && cycles == 3) begin
        dividend = '1; divisor = M'(1); start = 1'b1;
      end else begin
        start = 1'b0;
      end
      @(negedge clk);
      cycles++;
      if (cycles > 4 * N) break;
    end
    start = 1'b0;
    iters = ref_steps(y, x, rems);
    exp_q = (x == '0) ? '0 : y / x;
    exp_r = (x == '0) ? y  : y % x;
    checks++;
    if (quotient !== N'(exp_q) || remainder !== N'(exp_r) || div_by_zero !== (x == '0)) begin
      failures++;
      $display("FAIL %h / %h: q=%h (exp %h) r=%h (exp %h) dz=%b", y, x, quotient, exp_q,
               remainder, exp_r, div_by_zero);
    end
    checks++;
    if (cycles != ((x == '0) ? 2 : iters + 3)) begin
      failures++;
      $display("FAIL latency %h / %h: %0d cycles, expected %0d", y, x, cycles, iters + 3);
    end
    checks++;
    if (x != '0 && step_rems != rems) begin
      failures++;
      $display("FAIL partial remainders %h / %h", y, x);
    end
    n = bits_of(y); m = bits_of(x);
    if (x != '0 && n >= m) begin
      checks++;
      if (iters > 2 * (n - m) + 1) begin
        failures++; $display("FAIL: %0d iterations for n=%0d m=%0d", iters, n, m);
      end
      if (iters > n - m + 1) n_over_lemma++;
    end
  endtask

  task automatic expect_steps(int got, int want, string what);
    checks++;
    if (got != want) begin
      failures++; $display("FAIL %s: %0d iterations, expected %0d", what, got, want);
    end
  endtask

  initial begin
    int it;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Worked example: 101110 / 10111 -> Q = 10, R = 0 in 2 iterations.
    divide(512'b101110, 512'b10111, 0, it);
    expect_steps(it, 2, "46 / 23");
    // Worked example: 11101 / 11 -> partial remainders 10001, 101, 10.
    divide(512'b11101, 512'b11, 0, it);
    expect_steps(it, 3, "29 / 3");
    checks++;
    if (step_rems.size() != 3 || step_rems[0] != 17 || step_rems[1] != 5 || step_rems[2] != 2) begin
      failures++; $display("FAIL: 29 / 3 partial remainders differ from 17, 5, 2");
    end

    // Corners.
    divide('0, 512'd5, 0, it);
    divide(512'd7, '0, 0, it);
    divide(512'd4, 512'd9, 0, it);
    divide(512'd9, 512'd9, 0, it);
    divide(512'd10, 512'd9, 0, it);
    divide(512'd8, 512'd9, 0, it);
    divide(word_t'({N{1'b1}}), 512'd1, 0, it);
    divide(word_t'({N{1'b1}}), word_t'({M{1'b1}}), 0, it);
    divide(word_t'(1) << (N - 1), word_t'(1) << (M - 1), 0, it);

    // Start during a division must be ignored.
    divide(rand_len(200), rand_len(40), 1, it);

    // Back-to-back: start raised in the DONE cycle.
    @(negedge clk);
    dividend = N'(512'd100); divisor = M'(512'd7); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    dividend = N'(512'd1000); divisor = M'(512'd33); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (quotient !== N'(30) || remainder !== N'(10)) begin
      failures++; $display("FAIL back-to-back: q=%0d r=%0d", quotient, remainder);
    end

    // Random divisions at the evaluated operand sizes.
    for (int k = 0; k < 8; k++) begin
      for (int i = 0; i < 60; i++) begin
        int ny, mx;
        ny = $urandom_range(1, SIZES[k][0]);
        mx = $urandom_range(1, SIZES[k][1]);
        if (i < 30) ny = SIZES[k][0];   // full-length dividends first
        divide(rand_len(ny), rand_len(mx), 0, it);
      end
    end

    $display("mechanisms: safe=%0d unit=%0d end_equal_len=%0d end_shorter=%0d len_kept=%0d",
             n_safe_step, n_unit_step, n_end_equal_len, n_end_shorter, n_len_kept);
    $display("            div0=%0d ignored_start=%0d back_to_back=%0d over_n-m+1=%0d",
             n_div0, n_ignored_start, n_back_to_back, n_over_lemma);
    checks++;
    if (n_safe_step == 0 || n_unit_step == 0 || n_end_equal_len == 0 || n_end_shorter == 0 ||
        n_len_kept == 0 || n_div0 == 0 || n_ignored_start == 0 || n_back_to_back == 0) begin
      failures++; $display("FAIL: a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
