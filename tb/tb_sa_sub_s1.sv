// Testbench for subtractor S1 (bit difference A = n - m).
//
// Drives the default 256-bit / 128-bit block with operands of chosen
// significant-bit lengths, including zero operands and equal lengths, and
// compares A, its sign flags and the step shift with the lengths used to
// build the operands.
module tb_sa_sub_s1;
  import tb_sa_ref_pkg::*;

  localparam int unsigned N  = 256;
  localparam int unsigned M  = 128;
  localparam int unsigned LW = $clog2(N + 1);
  localparam int unsigned SW = $clog2(N);

  logic [N-1:0]       y;
  logic [M-1:0]       x;
  logic signed [LW:0] a_diff;
  logic               a_pos, a_zero;
  logic [SW-1:0]      shift;

  int checks = 0;
  int failures = 0;

  sa_sub_s1 #(.N(N), .M(M)) dut (.*);

  task automatic try(int ny, int mx);
    int exp_a;
    y = N'(rand_len(ny));
    x = M'(rand_len(mx));
    #1;
    exp_a = ny - mx;
    checks++;
    if (a_diff !== (LW+1)'(exp_a) || a_pos !== (exp_a >= 1) || a_zero !== (exp_a == 0) ||
        shift !== ((exp_a >= 1) ? SW'(exp_a - 1) : SW'(0))) begin
      failures++;
      $display("FAIL n=%0d m=%0d: a=%0d pos=%b zero=%b shift=%0d", ny, mx, a_diff, a_pos, a_zero, shift);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Corners: zero operands, full widths, equal lengths.
    try(0, 0);  try(0, 1);   try(1, 0);   try(N, M);   try(N, 1);
    try(1, M);  try(M, M);   try(6, 5);   try(5, 2);   try(M + 1, M);
    for (int i = 0; i < 2000; i++) try($urandom_range(0, N), $urandom_range(0, M));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
