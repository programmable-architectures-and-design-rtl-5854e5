// nfg2_uniform: two-variable numeric function generator for a uniform planar
// segmentation.
//
// The domain is cut into 2^UB x 2^UB equal squares.  Because the number of
// segments is a power of two, no segment index encoder is needed: the UB
// most significant bits of X and of Y form the coefficients-memory address,
// and the remaining low bits are directly the offsets X - Bx and Y - By (no
// AND gates either).  Multipliers and adders then compute
//   out = Cxy (X-Bx)(Y-By) + Cx (X-Bx) + Cy (Y-By) + C0.
// The coefficients memory is a RAM, loaded through the coef_* port.
//
// Interface: x, y unsigned with N fractional bits; out signed, OUT_W bits,
// OUT_F fractional.  Memory word {Cxy, Cx, Cy, C0}, signed, CW bits, CF
// fractional, at address {x[N-1 -: UB], y[N-1 -: UB]}.
// Timing: four pipeline stages (memory read, then three in the evaluator):
// out_valid follows in_valid by 4 clocks, one result per clock.
//
// Follows the method: addressing by the top bits, offsets from the low bits,
// four pipeline stages.  This design's choice: number formats, UB = 7
// (16,384 segments) as the default memory size.
module nfg2_uniform #(
  parameter int unsigned N     = nfg2_pkg::N_BITS,
  parameter int unsigned UB    = nfg2_pkg::UNI_BITS,
  parameter int unsigned CW    = nfg2_pkg::COEF_W,
  parameter int unsigned CF    = nfg2_pkg::COEF_F,
  parameter int unsigned OUT_W = nfg2_pkg::OUT_W,
  parameter int unsigned OUT_F = nfg2_pkg::OUT_F,
  localparam int unsigned AW      = 2 * UB,
  localparam int unsigned DX_W    = N - UB,
  localparam int unsigned COEF_DW = 4 * CW
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [N-1:0]            x,
  input  logic [N-1:0]            y,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out,
  input  logic                    coef_we,
  input  logic [AW-1:0]           coef_waddr,
  input  logic [COEF_DW-1:0]      coef_wdata
);

  typedef struct packed {
    logic signed [CW-1:0] cxy;
    logic signed [CW-1:0] cx;
    logic signed [CW-1:0] cy;
    logic signed [CW-1:0] c0;
  } coef_word_t;

  coef_word_t      cw_q;
  logic            v1;
  logic [DX_W-1:0] dx1, dy1;

  nfg_ram #(.DW(COEF_DW), .AW(AW)) u_coef (
    .clk   (clk),
    .we    (coef_we),
    .waddr (coef_waddr),
    .wdata (coef_wdata),
    .raddr ({x[N-1 -: UB], y[N-1 -: UB]}),
    .rdata (cw_q)
  );

  always_ff @(posedge clk) begin
    dx1 <= x[DX_W-1:0];
    dy1 <= y[DX_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
  end

  bilinear_eval #(
    .DX_W(DX_W), .M(N), .CW(CW), .CF(CF), .OUT_W(OUT_W), .OUT_F(OUT_F)
  ) u_eval (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (v1),
    .dx        (dx1),
    .dy        (dy1),
    .cxy       (cw_q.cxy),
    .cx        (cw_q.cx),
    .cy        (cw_q.cy),
    .c0        (cw_q.c0),
    .out_valid (out_valid),
    .out       (out)
  );

endmodule
