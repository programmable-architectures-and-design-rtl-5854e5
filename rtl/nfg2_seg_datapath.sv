// nfg2_seg_datapath: the shared body of the recursively segmented NFGs.
//
// Segment index encoder -> coefficients memory -> AND gates -> bilinear
// polynomial evaluator.  The encoder works on (x_enc, y_enc); the offsets
// are formed from (x_dp, y_dp), which travel in a delay line beside the
// encoder.  The plain recursive NFG feeds the same X and Y to both; the NFG
// for symmetric functions feeds the exchanged pair to the datapath.
//
// Coefficients memory word (COEF_DW bits, most significant first):
//   {Bx, By, Cxy, Cx, Cy, C0}
// with Bx, By the segment's lower corner (N bits each, unsigned) and the
// coefficients signed, CW bits, CF fractional bits, referred to the offsets
// X - Bx and Y - By.
//
// Timing: NCELL + 1 clocks in the encoder, 1 in the coefficients memory,
// 3 in the evaluator; out and out_valid follow the inputs by NCELL + 5
// clocks, with one new input accepted every clock.
module nfg2_seg_datapath #(
  parameter int unsigned N         = 12,
  parameter int unsigned SEG_W     = 14,
  parameter int unsigned RAIL_W    = 14,
  parameter int unsigned CELL_BITS = 2,
  parameter int unsigned CW        = 34,
  parameter int unsigned CF        = 20,
  parameter int unsigned OUT_W     = 16,
  parameter int unsigned OUT_F     = 12,
  localparam int unsigned NCELL    = (2 * N) / CELL_BITS,
  localparam int unsigned LUT_AW   = RAIL_W + CELL_BITS,
  localparam int unsigned LUT_DW   = RAIL_W + SEG_W,
  localparam int unsigned CELL_SW  = (NCELL > 1) ? $clog2(NCELL) : 1,
  localparam int unsigned COEF_DW  = 2 * N + 4 * CW
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [N-1:0]            x_enc,
  input  logic [N-1:0]            y_enc,
  input  logic [N-1:0]            x_dp,
  input  logic [N-1:0]            y_dp,
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

  typedef struct packed {
    logic        [N-1:0]  bx;
    logic        [N-1:0]  by;
    logic signed [CW-1:0] cxy;
    logic signed [CW-1:0] cx;
    logic signed [CW-1:0] cy;
    logic signed [CW-1:0] c0;
  } coef_word_t;

  localparam int unsigned DLY = NCELL + 2;  // encoder + coefficients memory

  logic             seg_valid;
  logic [SEG_W-1:0] seg;
  coef_word_t       cw_q;
  logic             cw_valid;
  logic [N-1:0]     xd [DLY+1];
  logic [N-1:0]     yd [DLY+1];
  logic [N-1:0]     dx, dy;

  seg_index_encoder #(
    .N(N), .SEG_W(SEG_W), .RAIL_W(RAIL_W), .CELL_BITS(CELL_BITS)
  ) u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .x         (x_enc),
    .y         (y_enc),
    .seg_valid (seg_valid),
    .seg       (seg),
    .lut_we    (lut_we),
    .lut_cell  (lut_cell),
    .lut_waddr (lut_waddr),
    .lut_wdata (lut_wdata)
  );

  nfg_ram #(.DW(COEF_DW), .AW(SEG_W)) u_coef (
    .clk   (clk),
    .we    (coef_we),
    .waddr (coef_waddr),
    .wdata (coef_wdata),
    .raddr (seg),
    .rdata (cw_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cw_valid <= 1'b0;
    else        cw_valid <= seg_valid;
  end

  // Delay line that keeps X and Y beside the encoder and the memory.
  assign xd[0] = x_dp;
  assign yd[0] = y_dp;
  always_ff @(posedge clk) begin
    for (int i = 1; i <= int'(DLY); i++) begin
      xd[i] <= xd[i-1];
      yd[i] <= yd[i-1];
    end
  end

  offset_and #(.N(N)) u_and (
    .x  (xd[DLY]),
    .y  (yd[DLY]),
    .bx (cw_q.bx),
    .by (cw_q.by),
    .dx (dx),
    .dy (dy)
  );

  bilinear_eval #(
    .DX_W(N), .M(N), .CW(CW), .CF(CF), .OUT_W(OUT_W), .OUT_F(OUT_F)
  ) u_eval (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (cw_valid),
    .dx        (dx),
    .dy        (dy),
    .cxy       (cw_q.cxy),
    .cx        (cw_q.cx),
    .cy        (cw_q.cy),
    .c0        (cw_q.c0),
    .out_valid (out_valid),
    .out       (out)
  );

endmodule
