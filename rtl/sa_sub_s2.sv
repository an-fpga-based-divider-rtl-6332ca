// Subtractor S2: partial-remainder update on the top m+1 bits.
//
// With B = 2^shift, the step Y' - B*X only touches the bits of Y' at and
// above position shift. The block therefore takes the window Y' >> shift
// (which, for shift = A-1, is exactly the top m+1 significant bits of Y'),
// subtracts the divisor with an (M+1)-bit subtractor, and appends the
// untouched low bits again: Y'new = diff || Y'[shift-1:0]. Only M+1 bits are
// subtracted per step, as the document describes; the shifters that select
// and re-insert the window are this design's way of placing it.
//
// ge reports that the window is not smaller than X (no borrow), i.e. that
// the step is acceptable; the caller ignores y_new when ge is low. The
// window Y' >> shift must fit in M+1 bits, which holds for shift = A-1 and
// for shift = 0 when A = 0; a wider window reads as ge = 1 with y_new
// undefined.
//
// Purely combinational.
//   y     : partial remainder Y' (N bits)
//   x     : divisor X (M bits)
//   shift : weight of the step, B = 1 << shift
//   y_new : Y' - (X << shift), valid when ge
//   ge    : (Y' >> shift) >= X
module sa_sub_s2 #(
  parameter int unsigned N  = 256,
  parameter int unsigned M  = 128,
  parameter int unsigned SW = $clog2(N)
) (
  input  logic [N-1:0]  y,
  input  logic [M-1:0]  x,
  input  logic [SW-1:0] shift,
  output logic [N-1:0]  y_new,
  output logic          ge
);

  // Internal width: at least M+1 so that the window fits even when N = M.
  localparam int unsigned W = (N > M) ? N : M + 1;

  logic [W-1:0] y_w;
  logic [W-1:0] y_hi;      // Y' >> shift
  logic [M:0]   window;    // top m+1 bits of Y'
  logic [M+1:0] diff_ext;  // window - X with borrow bit
  logic [W-1:0] low_mask;
  logic [W-1:0] y_new_w;

  always_comb begin
    y_w      = W'(y);
    y_hi     = y_w >> shift;
    // Any bit above M+1 of the window means it is certainly >= X.
    window   = y_hi[M:0];
    diff_ext = {1'b0, window} - {2'b00, x};
    ge       = ((y_hi >> (M + 1)) != '0) || !diff_ext[M+1];
    low_mask = (W'(1) << shift) - W'(1);
    y_new_w  = (y_w & low_mask) | (W'(diff_ext[M:0]) << shift);
    // Y'new <= Y', so it always fits back into N bits.
    y_new    = y_new_w[N-1:0];
  end

endmodule
