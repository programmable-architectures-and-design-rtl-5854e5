// sym_swap: comparator and multiplexers of the NFG for symmetric functions.
//
// For a symmetric function f(X,Y) = f(Y,X) the coefficients memory holds only
// the segments on or above the diagonal (X <= Y).  The bilinear
// interpolation of the mirror segment satisfies g1(X,Y) = g2(Y,X), so a point
// with X > Y is evaluated as (Y, X) with the stored segment's coefficients.
// This block compares X with Y and exchanges them when X > Y.  It is
// combinational and works beside the segment index encoder, which still sees
// the original X and Y.
module sym_swap #(
  parameter int unsigned N = 12   // bits per input
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] xs,       // min(X, Y)
  output logic [N-1:0] ys,       // max(X, Y)
  output logic         swapped   // X > Y
);

  always_comb begin
    swapped = (x > y);
    xs      = swapped ? y : x;
    ys      = swapped ? x : y;
  end

endmodule
