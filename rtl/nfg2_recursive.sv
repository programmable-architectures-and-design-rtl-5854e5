// nfg2_recursive: two-variable numeric function generator for a recursive
// (non-uniform, quadtree) planar segmentation.
//
// The domain is cut into squares of different sizes, each approximated by a
// bilinear polynomial.  A segment index encoder (a LUT cascade with rails and
// Arails) turns (X, Y) into the segment number, which addresses the
// coefficients memory.  The memory word holds the segment's lower corner
// (Bx, By) and its coefficients Cxy, Cx, Cy, C0.  AND gates form
// X - Bx = X & ~Bx and Y - By = Y & ~By, and multipliers and adders compute
//   out = Cxy (X-Bx)(Y-By) + Cx (X-Bx) + Cy (Y-By) + C0.
// All tables are RAMs loaded through the coef_* and lut_* ports, so one
// circuit serves any function whose segmentation fits.
//
// Interface: x, y unsigned with N fractional bits; out signed, OUT_W bits,
// OUT_F fractional.  Coefficients memory word {Bx, By, Cxy, Cx, Cy, C0}
// (2N + 4CW bits).  LUT word {rails_out, arail} at address
// {rails_in, z_bits} of cell lut_cell.
// Timing: fully pipelined, one result per clock, out_valid NCELL + 5 clocks
// after in_valid (17 clocks at the default 12-bit inputs and 2 Z bits per
// cell).  Table loading may overlap evaluation; a result computed while its
// tables change is undefined.
//
// Follows the method: the structure encoder -> memory -> AND gates ->
// multipliers and adders, and the programmability through RAMs.  This
// design's choice: coefficient and output formats, cell size, pipeline.
module nfg2_recursive #(
  parameter int unsigned N         = nfg2_pkg::N_BITS,
  parameter int unsigned SEG_W     = nfg2_pkg::SEG_W,
  parameter int unsigned RAIL_W    = nfg2_pkg::RAIL_W,
  parameter int unsigned CELL_BITS = nfg2_pkg::CELL_BITS,
  parameter int unsigned CW        = nfg2_pkg::COEF_W,
  parameter int unsigned CF        = nfg2_pkg::COEF_F,
  parameter int unsigned OUT_W     = nfg2_pkg::OUT_W,
  parameter int unsigned OUT_F     = nfg2_pkg::OUT_F,
  localparam int unsigned NCELL    = (2 * N) / CELL_BITS,
  localparam int unsigned LUT_AW   = RAIL_W + CELL_BITS,
  localparam int unsigned LUT_DW   = RAIL_W + SEG_W,
  localparam int unsigned CELL_SW  = (NCELL > 1) ? $clog2(NCELL) : 1,
  localparam int unsigned COEF_DW  = 2 * N + 4 * CW
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [N-1:0]            x,
  input  logic [N-1:0]            y,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out,
  input  logic                    coef_we,
  input  logic [SEG_W-1:0]        coef_waddr,
  input  logic [COEF_DW-1:0]      coef_wdata,
  input  logic                    lut_we,
  input  logic [CELL_SW-1:0]      lut_cell,
  input  logic [LUT_AW-1:0]       lut_waddr,
  input  logic [LUT_DW-1:0]       lut_wdata
);

  nfg2_seg_datapath #(
    .N(N), .SEG_W(SEG_W), .RAIL_W(RAIL_W), .CELL_BITS(CELL_BITS),
    .CW(CW), .CF(CF), .OUT_W(OUT_W), .OUT_F(OUT_F)
  ) u_dp (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .x_enc      (x),
    .y_enc      (y),
    .x_dp       (x),
    .y_dp       (y),
    .out_valid  (out_valid),
    .out        (out),
    .coef_we    (coef_we),
    .coef_waddr (coef_waddr),
    .coef_wdata (coef_wdata),
    .lut_we     (lut_we),
    .lut_cell   (lut_cell),
    .lut_waddr  (lut_waddr),
    .lut_wdata  (lut_wdata)
  );

endmodule
