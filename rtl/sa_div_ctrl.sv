// Controller of the simulated-annealing divider.
//
// Runs the loop of the division flowchart. After start the operands are
// captured (Register A, divisor register), then Y' = Y is loaded into
// Register R and the quotient is cleared. Each ITER cycle evaluates one
// annealing step from the S1/S2 flags:
//   * acceptance (prob): a step is taken when A >= 1 (the top m+1 bits of Y'
//     always exceed X), or when A = 0 and Y' >= X (the final step of weight 1);
//   * temperature: when no step can be taken (A < 0, or A = 0 with Y' < X)
//     the temperature reaches the goal, Y' is the remainder and the loop ends.
// The loop is therefore bounded by the goal, not by a cooling count. A zero
// divisor skips the loop (quotient 0, remainder = dividend), which is this
// design's choice; the document assumes a non-zero divisor.
//
// Timing: start is sampled in IDLE or DONE. One LOAD cycle, then one ITER
// cycle per accepted step plus the cycle that detects the end, then done is
// high for one cycle (DONE). From the clock that samples start to the clock
// that first sees done: iterations + 3 cycles.
//   start     : begin a division (ignored while busy)
//   x_zero    : divisor register is zero
//   a_pos     : S1 says A >= 1
//   a_zero    : S1 says A == 0
//   ge        : S2 says the window is not smaller than X
//   capture   : load Register A and the divisor register
//   load_r    : Register R <- Register A, clear the quotient path
//   step      : accept the step: Register R <- S2 result, Register B <- step
//   busy/done : status; done pulses with the result valid
//   state     : current state, for observation
module sa_div_ctrl
  import sa_div_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       x_zero,
  input  logic       a_pos,
  input  logic       a_zero,
  input  logic       ge,
  output logic       capture,
  output logic       load_r,
  output logic       step,
  output logic       busy,
  output logic       done,
  output div_state_e state
);

  div_state_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    capture = 1'b0;
    load_r  = 1'b0;
    step    = 1'b0;
    unique case (state_q)
      ST_IDLE, ST_DONE: begin
        if (start) begin
          capture = 1'b1;
          state_d = ST_LOAD;
        end else begin
          state_d = ST_IDLE;
        end
      end
      ST_LOAD: begin
        load_r  = 1'b1;
        state_d = x_zero ? ST_DONE : ST_ITER;
      end
      ST_ITER: begin
        step = a_pos || (a_zero && ge);
        if (!step) state_d = ST_DONE;
      end
      default: state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= ST_IDLE;
    else        state_q <= state_d;
  end

  assign busy  = (state_q == ST_LOAD) || (state_q == ST_ITER);
  assign done  = (state_q == ST_DONE);
  assign state = state_q;

endmodule
