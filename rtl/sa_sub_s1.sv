// Subtractor S1: bit difference between partial remainder and divisor.
//
// Counts the significant bits n of the partial remainder Y' and m of the
// divisor X and subtracts them, A = n - m. A is the heuristic of the divider:
// for A >= 1 the largest step that is always safe is B = 2^(A-1) (a one
// followed by A-1 zeros), i.e. subtracting X from the top m+1 bits of Y'.
// For A = 0 a single step of weight 1 is tried; for A < 0 no step fits.
// Following the document, the block subtracts bit counts, not operand values.
// The shift output is this design's encoding of B: B = 1 << shift.
//
// Purely combinational.
//   y      : partial remainder Y' (N bits)
//   x      : divisor X (M bits)
//   a_diff : A = n - m, two's complement
//   a_pos  : A >= 1
//   a_zero : A == 0
//   shift  : A - 1 when a_pos, else 0
module sa_sub_s1 #(
  parameter int unsigned N  = 256,
  parameter int unsigned M  = 128,
  parameter int unsigned LW = $clog2(N + 1),
  parameter int unsigned SW = $clog2(N)
) (
  input  logic [N-1:0]      y,
  input  logic [M-1:0]      x,
  output logic signed [LW:0] a_diff,
  output logic              a_pos,
  output logic              a_zero,
  output logic [SW-1:0]     shift
);

  logic [LW-1:0]           n_len;
  logic [$clog2(M+1)-1:0]  m_len;

  sa_bitlen #(.W(N)) u_len_y (.value(y), .len(n_len));
  sa_bitlen #(.W(M)) u_len_x (.value(x), .len(m_len));

  always_comb begin
    a_diff = $signed({1'b0, n_len}) - $signed((LW+1)'(m_len));
    a_pos  = (a_diff > 0);
    a_zero = (a_diff == 0);
    shift  = a_pos ? SW'(a_diff - 1) : '0;
  end

endmodule
