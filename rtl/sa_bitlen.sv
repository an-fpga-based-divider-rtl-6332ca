// Significant-bit counter (leading-one detector).
//
// Returns the number of significant bits of an unsigned word: the index of
// its most significant one plus one, and zero for an all-zero word. This is
// the "number of bits" n or m of an operand that the bit-difference
// subtractor S1 works on. Purely combinational; a priority scan from the LSB
// so that the highest set bit wins.
//
//   value : W-bit unsigned operand
//   len   : 0 .. W
module sa_bitlen #(
  parameter int unsigned W  = 256,
  parameter int unsigned LW = $clog2(W + 1)
) (
  input  logic [W-1:0]  value,
  output logic [LW-1:0] len
);

  always_comb begin
    len = '0;
    for (int unsigned i = 0; i < W; i++) begin
      if (value[i]) len = LW'(i + 1);
    end
  end

endmodule
