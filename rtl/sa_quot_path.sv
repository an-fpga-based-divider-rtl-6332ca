// Quotient path: Register B, adder and Register Q.
//
// Every accepted annealing step contributes B = 2^shift to the quotient.
// Register B captures the step chosen by S1 in the cycle it is taken, and in
// the following cycle the adder adds B (a one followed by shift zeros) into
// Register Q. The partial remainder and the quotient are therefore built side
// by side: the remainder is updated in the cycle of the step, the quotient
// one cycle later, which is the Register B stage of the document's quotient
// path. The adder adds a one-hot word, so no quotient-bit multiplexing is
// needed. A cleared Register B (valid = 0) adds nothing.
//
// Timing: step_valid/step_shift sampled at clock k appear in q after
// clock k+1. clear empties both registers at the next clock.
//   clk, rst_n  : clock, asynchronous active-low reset
//   clear       : start of a new division
//   step_valid  : a step is accepted this cycle
//   step_shift  : its weight, B = 1 << step_shift
//   q           : Register Q, the accumulated quotient
//   b_pending   : Register B holds a step not yet added
module sa_quot_path #(
  parameter int unsigned N  = 256,
  parameter int unsigned SW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          step_valid,
  input  logic [SW-1:0] step_shift,
  output logic [N-1:0]  q,
  output logic          b_pending
);

  typedef struct packed {
    logic          valid;
    logic [SW-1:0] shift;
  } b_reg_t;

  b_reg_t       b_q;
  logic [N-1:0] b_word;
  logic [N:0]   sum;

  always_comb begin
    b_word    = b_q.valid ? (N'(1) << b_q.shift) : '0;
    sum       = {1'b0, q} + {1'b0, b_word};
    b_pending = b_q.valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_q <= '0;
      q   <= '0;
    end else if (clear) begin
      b_q <= '0;
      q   <= '0;
    end else begin
      b_q <= '{valid: step_valid, shift: step_shift};
      q   <= sum[N-1:0];
      // The quotient of an N-bit dividend always fits in N bits.
      assert (!sum[N]) else $error("quotient register overflow");
    end
  end

endmodule
