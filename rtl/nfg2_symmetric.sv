// nfg2_symmetric: two-variable numeric function generator for symmetric
// functions, f(X,Y) = f(Y,X).
//
// The recursive segmentation of a symmetric function is itself symmetric,
// and the bilinear interpolations of a pair of mirror segments satisfy
// g1(X,Y) = g2(Y,X).  Both segments of a pair therefore share one segment
// number and one coefficients-memory word: the word of the segment on or
// above the diagonal (X <= Y).  A comparator and two multiplexers
// (sym_swap) exchange X and Y when X > Y, so the datapath always evaluates
// the stored segment at (min, max).  The segment index encoder still reads
// the original X and Y; the comparator and multiplexers work in parallel
// with it and add no pipeline stage.  The coefficients memory needs roughly
// half the words of the plain recursive NFG.
//
// Interface and timing are those of nfg2_recursive: out_valid NCELL + 5
// clocks after in_valid, one result per clock.  The encoder's tables must
// give both segments of a mirror pair the same number, and the memory must
// hold, for that number, the corner and coefficients of the upper segment.
module nfg2_symmetric #(
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

  logic [N-1:0] xs, ys;
  logic         swapped;   // X > Y; the exchange itself is in xs, ys

  sym_swap #(.N(N)) u_swap (
    .x       (x),
    .y       (y),
    .xs      (xs),
    .ys      (ys),
    .swapped (swapped)
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
    .x_dp       (xs),
    .y_dp       (ys),
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
