// offset_and: bitwise AND gates that form the offset inputs X - Bx and
// Y - By of a recursively segmented NFG.
//
// A recursive segment is a square whose corner (Bx, By) has its low h bits
// at 0 and whose side is 2^h units of the last place.  Inside the segment X
// agrees with Bx on every bit above h, so clearing the bits that are 1 in Bx
// gives X - Bx: dx = X & ~Bx.  The corner comes from the coefficients memory.
// Purely combinational.
module offset_and #(
  parameter int unsigned N = 12   // bits per input
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] bx,   // segment corner, X side
  input  logic [N-1:0] by,   // segment corner, Y side
  output logic [N-1:0] dx,   // X - Bx
  output logic [N-1:0] dy    // Y - By
);

  always_comb begin
    dx = x & ~bx;
    dy = y & ~by;
  end

endmodule
