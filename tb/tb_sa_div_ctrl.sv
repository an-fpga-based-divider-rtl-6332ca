// Testbench for the divider controller.
//
// Drives the S1/S2 flags by hand through the scenarios of the loop: a run
// of safe steps (A >= 1), the final unit step (A = 0, Y' >= X), the end on
// A = 0 with Y' < X, the end on A < 0, a zero divisor, start while busy
// (ignored) and start in DONE (back-to-back). Each cycle the expected
// state and control outputs are written out explicitly.
module tb_sa_div_ctrl;
  import sa_div_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start = 1'b0;
  logic       x_zero = 1'b0;
  logic       a_pos = 1'b0;
  logic       a_zero = 1'b0;
  logic       ge = 1'b0;
  logic       capture, load_r, step, busy, done;
  div_state_e state;

  int checks = 0;
  int failures = 0;

  sa_div_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Set the inputs for one cycle, check the outputs, advance one clock.
  task automatic cyc(logic s, logic xz, logic ap, logic az, logic g,
                     div_state_e exp_st, logic e_cap, logic e_ld, logic e_step);
    start = s; x_zero = xz; a_pos = ap; a_zero = az; ge = g;
    #1;
    checks++;
    if (state !== exp_st || capture !== e_cap || load_r !== e_ld || step !== e_step ||
        busy !== (exp_st == ST_LOAD || exp_st == ST_ITER) || done !== (exp_st == ST_DONE)) begin
      failures++;
      $display("FAIL t=%0t st=%s(exp %s) cap=%b ld=%b step=%b busy=%b done=%b",
               $time, state.name(), exp_st.name(), capture, load_r, step, busy, done);
    end
    @(negedge clk);
  endtask

  initial begin
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    //   start xz ap az ge   state    cap ld step
    cyc(0, 0, 0, 0, 0, ST_IDLE, 0, 0, 0);
    cyc(1, 0, 0, 0, 0, ST_IDLE, 1, 0, 0);
    cyc(0, 0, 0, 0, 0, ST_LOAD, 0, 1, 0);
    cyc(0, 0, 1, 0, 1, ST_ITER, 0, 0, 1);   // safe step
    cyc(1, 0, 1, 0, 1, ST_ITER, 0, 0, 1);   // start while busy: ignored
    cyc(0, 0, 1, 0, 1, ST_ITER, 0, 0, 1);
    cyc(0, 0, 0, 1, 1, ST_ITER, 0, 0, 1);   // final unit step
    cyc(0, 0, 0, 1, 0, ST_ITER, 0, 0, 0);   // A = 0, Y' < X: goal reached
    cyc(0, 0, 0, 0, 0, ST_DONE, 0, 0, 0);
    cyc(0, 0, 0, 0, 0, ST_IDLE, 0, 0, 0);
    // A < 0 right away (dividend shorter than divisor)
    cyc(1, 0, 0, 0, 0, ST_IDLE, 1, 0, 0);
    cyc(0, 0, 0, 0, 0, ST_LOAD, 0, 1, 0);
    cyc(0, 0, 0, 0, 1, ST_ITER, 0, 0, 0);   // ge alone does not step
    cyc(1, 0, 0, 0, 0, ST_DONE, 1, 0, 0);   // back-to-back start
    cyc(0, 1, 0, 0, 0, ST_LOAD, 0, 1, 0);   // zero divisor skips the loop
    cyc(0, 1, 1, 0, 1, ST_DONE, 0, 0, 0);
    cyc(0, 0, 1, 0, 1, ST_IDLE, 0, 0, 0);   // flags ignored in IDLE
    cyc(0, 0, 1, 0, 1, ST_IDLE, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
