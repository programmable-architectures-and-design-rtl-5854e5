// bilinear_eval: multipliers and adders that evaluate the bilinear polynomial
//   g = Cxy*dx*dy + Cx*dx + Cy*dy + C0
// of one segment at the offsets dx = X - Bx, dy = Y - By.
//
// Formats: dx and dy are unsigned with M fractional bits (the input
// accuracy); the four coefficients are signed with CF fractional bits; the
// result is signed with OUT_F fractional bits, rounded to nearest (ties
// upward) and saturated to OUT_W bits.  Every term is aligned to CF + 2M
// fractional bits before the sum, so the sum itself is exact.
//
// Pipeline, three stages (one result per clock):
//   1: Cxy*dx, Cx*dx, Cy*dy
//   2: (Cxy*dx)*dy, Cx*dx + Cy*dy
//   3: final sum, rounding, saturation -> out
// out_valid follows in_valid three clocks later.  The split into stages is
// this design's choice.
module bilinear_eval #(
  parameter int unsigned DX_W  = 12,  // width of dx and dy
  parameter int unsigned M     = 12,  // fractional bits of dx and dy
  parameter int unsigned CW    = 34,  // coefficient width
  parameter int unsigned CF    = 20,  // coefficient fractional bits
  parameter int unsigned OUT_W = 16,  // output width
  parameter int unsigned OUT_F = 12   // output fractional bits
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic        [DX_W-1:0]  dx,
  input  logic        [DX_W-1:0]  dy,
  input  logic signed [CW-1:0]    cxy,
  input  logic signed [CW-1:0]    cx,
  input  logic signed [CW-1:0]    cy,
  input  logic signed [CW-1:0]    c0,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out
);

  localparam int unsigned P1_W  = CW + DX_W + 1;       // coefficient * offset
  localparam int unsigned P2_W  = CW + 2 * DX_W + 2;   // Cxy * dx * dy
  localparam int unsigned SUM_W = CW + 2 * M + 4;      // aligned sum
  localparam int unsigned SH    = CF + 2 * M - OUT_F;  // bits dropped

  // Stage 1 registers
  logic                    v1;
  logic signed [P1_W-1:0]  pxy1, px1, py1;
  logic        [DX_W-1:0]  dy1;
  logic signed [CW-1:0]    c01;
  // Stage 2 registers
  logic                    v2;
  logic signed [P2_W-1:0]  pxy2;
  logic signed [SUM_W-1:0] lin2;
  logic signed [CW-1:0]    c02;

  logic signed [SUM_W-1:0] sum3, rnd3;
  logic signed [OUT_W-1:0] sat3;

  always_ff @(posedge clk) begin
    pxy1 <= P1_W'(cxy) * $signed({1'b0, dx});
    px1  <= P1_W'(cx)  * $signed({1'b0, dx});
    py1  <= P1_W'(cy)  * $signed({1'b0, dy});
    dy1  <= dy;
    c01  <= c0;

    pxy2 <= P2_W'(pxy1) * $signed({1'b0, dy1});
    lin2 <= (SUM_W'(px1) <<< M) + (SUM_W'(py1) <<< M);
    c02  <= c01;
  end

  // Stage 3: align, add, round, saturate.
  always_comb begin
    sum3 = SUM_W'(pxy2) + lin2 + (SUM_W'(c02) <<< (2 * M));
    if (SH > 0) rnd3 = (sum3 + (SUM_W'(1) <<< (SH - 1))) >>> SH;
    else        rnd3 = sum3;
    if (rnd3 > SUM_W'((2 ** (OUT_W - 1)) - 1))
      sat3 = {1'b0, {(OUT_W - 1){1'b1}}};
    else if (rnd3 < -SUM_W'(2 ** (OUT_W - 1)))
      sat3 = {1'b1, {(OUT_W - 1){1'b0}}};
    else
      sat3 = OUT_W'(rnd3);
  end

  always_ff @(posedge clk) out <= sat3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      v2        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      v2        <= v1;
      out_valid <= v2;
    end
  end

endmodule
