// Shared types of the simulated-annealing divider.
//
// The divider runs as a small sequence: operands are captured, the partial
// remainder register is loaded, the divider iterates one step per clock until
// the termination test holds, and the result is flagged done for one cycle.
// The controller states are defined here so the controller, the top level
// and the testbenches agree on the encoding.
package sa_div_pkg;

  typedef enum logic [2:0] {
    ST_IDLE = 3'd0,  // waiting for start; quotient/remainder hold the last result
    ST_LOAD = 3'd1,  // Register R <- Register A (Y' = Y), Register Q <- 0
    ST_ITER = 3'd2,  // one annealing step per cycle
    ST_DONE = 3'd3   // result valid, done pulses for this cycle
  } div_state_e;

endpackage
