// Testbench for the quotient path (Register B, adder, Register Q).
//
// Default 256-bit block. Feeds random streams of accepted and idle steps
// with random weights, clears between runs, and checks every cycle that
// Register Q equals the sum of 2^shift over all steps sampled up to two
// clocks earlier (one clock in Register B, one in Register Q), and that the
// pending flag mirrors the step sampled one clock earlier.
module tb_sa_quot_path;
  localparam int unsigned N  = 256;
  localparam int unsigned SW = $clog2(N);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          clear = 1'b0;
  logic          step_valid = 1'b0;
  logic [SW-1:0] step_shift = '0;
  logic [N-1:0]  q;
  logic          b_pending;

  int checks = 0;
  int failures = 0;

  sa_quot_path #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] exp_q;      // sum of steps that have reached Register Q
  logic [N-1:0] in_b;       // weight currently in Register B
  logic         in_b_valid;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 40; run++) begin
      // clear
      @(negedge clk);
      clear = 1'b1; step_valid = 1'b0;
      @(negedge clk);
      clear = 1'b0;
      exp_q = '0; in_b = '0; in_b_valid = 1'b0;
      checks++;
      if (q !== '0 || b_pending !== 1'b0) begin
        failures++; $display("FAIL: clear did not empty the path");
      end
      // steps; distinct shifts per run keep the sum inside N bits
      for (int i = 0; i < 60; i++) begin
        step_valid = ($urandom_range(0, 3) != 0);
        step_shift = SW'($urandom_range(0, N - 1));
        if (step_valid) step_shift = SW'(N - 1 - i * 4 - (run % 4));
        @(negedge clk);
        exp_q = exp_q + (in_b_valid ? in_b : '0);
        in_b = N'(1) << step_shift; in_b_valid = step_valid;
        checks++;
        if (q !== exp_q || b_pending !== in_b_valid) begin
          failures++;
          $display("FAIL run %0d step %0d: q=%h exp=%h pend=%b", run, i, q, exp_q, b_pending);
        end
      end
      // drain
      step_valid = 1'b0;
      @(negedge clk);
      exp_q = exp_q + (in_b_valid ? in_b : '0);
      checks++;
      if (q !== exp_q || b_pending !== 1'b0) begin
        failures++; $display("FAIL drain run %0d", run);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
