// nfg2_top: the three two-variable numeric function generators side by side.
//
// One input pair (X, Y) drives
//   - nfg2_uniform:   uniform segmentation, no segment index encoder,
//   - nfg2_recursive: recursive segmentation with a LUT-cascade encoder,
//   - nfg2_symmetric: recursive segmentation sharing one memory word between
//                     mirror segments of a symmetric function,
// so that the same function, or three different ones, can be evaluated by
// all three and compared.  Each generator has its own result and valid.
//
// Configuration: one write port reaches every RAM.  cfg_arch selects the
// generator, cfg_target the memory (coefficients memory or LUT memory),
// cfg_cell the LUT cell, cfg_addr the word; cfg_data is right-aligned to
// the word width of the target.  Loading new data changes the function
// without changing the circuit.
//
// Timing: uniform 4 clocks, recursive and symmetric NCELL + 5 clocks (17 at
// the defaults) from in_valid to the matching *_valid; one input per clock.
module nfg2_top
  import nfg2_pkg::*;
#(
  parameter int unsigned N         = N_BITS,
  parameter int unsigned UB        = UNI_BITS,
  parameter int unsigned SEGW      = SEG_W,
  parameter int unsigned RAILW     = RAIL_W,
  parameter int unsigned CELLB     = CELL_BITS,
  parameter int unsigned CW        = COEF_W,
  parameter int unsigned CF        = COEF_F,
  parameter int unsigned OW        = OUT_W,
  parameter int unsigned OF        = OUT_F,
  localparam int unsigned NCELL    = (2 * N) / CELLB,
  localparam int unsigned CELL_SW  = (NCELL > 1) ? $clog2(NCELL) : 1,
  localparam int unsigned LUT_AW   = RAILW + CELLB,
  localparam int unsigned LUT_DW   = RAILW + SEGW,
  localparam int unsigned UCOEF_DW = 4 * CW,
  localparam int unsigned RCOEF_DW = 2 * N + 4 * CW,
  localparam int unsigned CFG_AW   = (2 * UB > SEGW)
                                     ? ((2 * UB > LUT_AW) ? 2 * UB : LUT_AW)
                                     : ((SEGW > LUT_AW) ? SEGW : LUT_AW),
  localparam int unsigned CFG_DW   = (RCOEF_DW > LUT_DW) ? RCOEF_DW : LUT_DW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [N-1:0]         x,
  input  logic [N-1:0]         y,
  output logic                 uni_valid,
  output logic signed [OW-1:0] uni_out,
  output logic                 rec_valid,
  output logic signed [OW-1:0] rec_out,
  output logic                 sym_valid,
  output logic signed [OW-1:0] sym_out,
  input  logic                 cfg_we,
  input  arch_e                cfg_arch,
  input  cfg_target_e          cfg_target,
  input  logic [CELL_SW-1:0]   cfg_cell,
  input  logic [CFG_AW-1:0]    cfg_addr,
  input  logic [CFG_DW-1:0]    cfg_data
);

  logic uni_coef_we, rec_coef_we, rec_lut_we, sym_coef_we, sym_lut_we;

  always_comb begin
    uni_coef_we = cfg_we && cfg_arch == ARCH_UNI && cfg_target == CFG_COEF;
    rec_coef_we = cfg_we && cfg_arch == ARCH_REC && cfg_target == CFG_COEF;
    rec_lut_we  = cfg_we && cfg_arch == ARCH_REC && cfg_target == CFG_LUT;
    sym_coef_we = cfg_we && cfg_arch == ARCH_SYM && cfg_target == CFG_COEF;
    sym_lut_we  = cfg_we && cfg_arch == ARCH_SYM && cfg_target == CFG_LUT;
  end

  nfg2_uniform #(
    .N(N), .UB(UB), .CW(CW), .CF(CF), .OUT_W(OW), .OUT_F(OF)
  ) u_uni (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .x          (x),
    .y          (y),
    .out_valid  (uni_valid),
    .out        (uni_out),
    .coef_we    (uni_coef_we),
    .coef_waddr (cfg_addr[2*UB-1:0]),
    .coef_wdata (cfg_data[UCOEF_DW-1:0])
  );

  nfg2_recursive #(
    .N(N), .SEG_W(SEGW), .RAIL_W(RAILW), .CELL_BITS(CELLB),
    .CW(CW), .CF(CF), .OUT_W(OW), .OUT_F(OF)
  ) u_rec (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .x          (x),
    .y          (y),
    .out_valid  (rec_valid),
    .out        (rec_out),
    .coef_we    (rec_coef_we),
    .coef_waddr (cfg_addr[SEGW-1:0]),
    .coef_wdata (cfg_data[RCOEF_DW-1:0]),
    .lut_we     (rec_lut_we),
    .lut_cell   (cfg_cell),
    .lut_waddr  (cfg_addr[LUT_AW-1:0]),
    .lut_wdata  (cfg_data[LUT_DW-1:0])
  );

  nfg2_symmetric #(
    .N(N), .SEG_W(SEGW), .RAIL_W(RAILW), .CELL_BITS(CELLB),
    .CW(CW), .CF(CF), .OUT_W(OW), .OUT_F(OF)
  ) u_sym (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .x          (x),
    .y          (y),
    .out_valid  (sym_valid),
    .out        (sym_out),
    .coef_we    (sym_coef_we),
    .coef_waddr (cfg_addr[SEGW-1:0]),
    .coef_wdata (cfg_data[RCOEF_DW-1:0]),
    .lut_we     (sym_lut_we),
    .lut_cell   (cfg_cell),
    .lut_waddr  (cfg_addr[LUT_AW-1:0]),
    .lut_wdata  (cfg_data[LUT_DW-1:0])
  );

endmodule
