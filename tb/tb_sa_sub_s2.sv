// Testbench for subtractor S2 (top m+1 bit subtraction and re-append).
//
// Default 256-bit / 128-bit block. Checks the safe step of the algorithm
// (shift = A-1, which must never borrow), the unit step at A = 0 with and
// without borrow, and other shifts whose window fits in M+1 bits, against plain wide arithmetic:
// ge = (Y >> shift) >= X and, when ge, y_new = Y - (X << shift).
module tb_sa_sub_s2;
  import tb_sa_ref_pkg::*;

  localparam int unsigned N  = 256;
  localparam int unsigned M  = 128;
  localparam int unsigned SW = $clog2(N);

  logic [N-1:0]  y;
  logic [M-1:0]  x;
  logic [SW-1:0] shift;
  logic [N-1:0]  y_new;
  logic          ge;

  int checks = 0;
  int failures = 0;
  int n_borrow = 0;

  sa_sub_s2 #(.N(N), .M(M)) dut (.*);

  task automatic try(word_t yv, word_t xv, int sh);
    word_t exp_new;
    logic  exp_ge;
    y = N'(yv); x = M'(xv); shift = SW'(sh);
    #1;
    exp_ge  = ((yv >> sh) >= xv);
    exp_new = yv - (xv << sh);
    checks++;
    if (ge !== exp_ge || (exp_ge && y_new !== N'(exp_new))) begin
      failures++;
      $display("FAIL y=%h x=%h sh=%0d ge=%b y_new=%h", y, x, sh, ge, y_new);
    end
    if (!exp_ge) n_borrow++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ny, mx;
    // Document examples: 101110 - 10111 (shift 0), 11101 - (11 << 2).
    try(512'b101110, 512'b10111, 0);
    try(512'b11101, 512'b11, 2);
    try(512'b10111, 512'b10111, 0);
    try(512'b10, 512'b11, 0);
    for (int i = 0; i < 1500; i++) begin
      mx = $urandom_range(1, M);
      ny = $urandom_range(mx, N);
      // safe step, A-1 or unit step at equal length
      try(rand_len(ny), rand_len(mx), (ny > mx) ? ny - mx - 1 : 0);
      // any other shift that keeps the window within M+1 bits
      try(rand_len(ny), rand_len(mx),
          $urandom_range((ny > M + 1) ? ny - M - 1 : 0, ny - mx));
    end
    if (n_borrow == 0) begin
      failures++;
      $display("FAIL: no borrow case exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
