// Iterative unsigned divider built on a goal-directed annealing step.
//
// Divides an N-bit dividend Y by an M-bit divisor X. Instead of producing
// one quotient bit per cycle, each iteration looks at how many more
// significant bits the partial remainder Y' has than X (A = n - m, from
// subtractor S1) and takes the largest step that can never overshoot,
// B = 2^(A-1): X is subtracted from the top m+1 bits of Y' (subtractor S2)
// and B is added to the quotient (Register B, adder, Register Q). When Y'
// has as many bits as X, one last step of weight 1 is taken if Y' >= X.
// When no step fits, Y' is the remainder. Remainder and quotient are
// produced in the same iteration, on two separate paths.
//
// Registers: A holds the dividend, a divisor register holds X, R holds the
// partial remainder Y', B and Q form the quotient path. The register
// structure and the S1/S2/adder split follow the document; the one-cycle
// LOAD state, the divisor register, the zero-divisor handling and the
// start/busy/done handshake are this design's choices.
//
// Interface: pulse start with the operands valid (sampled in IDLE/DONE).
// quotient and remainder are valid while done is high and stay stable until
// the next start. div_by_zero is valid with done.
// Latency: iterations + 3 clocks from the clock sampling start to the clock
// that first sees done; iterations is at most 2*(n-m)+1 for an n-bit
// dividend and m-bit divisor.
module sa_divider
  import sa_div_pkg::*;
#(
  parameter int unsigned N = 256,
  parameter int unsigned M = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] dividend,
  input  logic [M-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] quotient,
  output logic [N-1:0] remainder,
  output logic         div_by_zero
);

  localparam int unsigned LW = $clog2(N + 1);
  localparam int unsigned SW = $clog2(N);

  // Registers A, divisor and R.
  logic [N-1:0] reg_a;
  logic [M-1:0] reg_x;
  logic [N-1:0] reg_r;

  // S1 / S2 results.
  logic signed [LW:0] a_diff;
  logic               a_pos, a_zero, ge;
  logic [SW-1:0]      shift;
  logic [N-1:0]       y_new;

  // Controller.
  logic       capture, load_r, step;
  div_state_e state;
  logic       b_pending;

  sa_sub_s1 #(.N(N), .M(M)) u_s1 (
    .y(reg_r), .x(reg_x),
    .a_diff(a_diff), .a_pos(a_pos), .a_zero(a_zero), .shift(shift)
  );

  sa_sub_s2 #(.N(N), .M(M)) u_s2 (
    .y(reg_r), .x(reg_x), .shift(shift),
    .y_new(y_new), .ge(ge)
  );

  sa_div_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start),
    .x_zero(reg_x == '0), .a_pos(a_pos), .a_zero(a_zero), .ge(ge),
    .capture(capture), .load_r(load_r), .step(step),
    .busy(busy), .done(done), .state(state)
  );

  sa_quot_path #(.N(N)) u_qpath (
    .clk(clk), .rst_n(rst_n), .clear(load_r),
    .step_valid(step), .step_shift(shift),
    .q(quotient), .b_pending(b_pending)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_a <= '0;
      reg_x <= '0;
      reg_r <= '0;
    end else begin
      if (capture) begin
        reg_a <= dividend;
        reg_x <= divisor;
      end
      if (load_r)    reg_r <= reg_a;
      else if (step) reg_r <= y_new;
      // The safe step never borrows: top m+1 bits of Y' exceed X.
      if (state == ST_ITER && a_diff > 0)
        assert (ge) else $error("S2 borrow on a step with A >= 1");
      // Register B is always drained when the result is presented.
      if (state == ST_DONE)
        assert (!b_pending) else $error("quotient step pending at done");
    end
  end

  assign remainder   = reg_r;
  assign div_by_zero = (reg_x == '0);

endmodule
