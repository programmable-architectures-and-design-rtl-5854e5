// seg_index_encoder: maps (X, Y) to the number of the segment that holds it,
// for a non-uniform (recursive) planar segmentation.
//
// The two inputs are interleaved into one word
//   Z = x[N-1] y[N-1] x[N-2] y[N-2] ... x[0] y[0]
// so that a recursive (quadtree) segmentation becomes a function of Z whose
// decision diagram can be cut into a cascade.  The cascade has NCELL LUT
// cells; cell c reads the next CELL_BITS bits of Z (most significant first)
// and, except for cell 0, the rails from cell c-1.  Each cell emits
//   rails  (RAIL_W bits): which sub-function of the remaining Z bits is left,
//   Arail  (SEG_W bits):  the sum of the edge weights crossed in this cell.
// The segment number is the sum of all Arails, taken modulo 2^SEG_W, so the
// cascade can realise any segment index function, including one where two
// mirror segments share a number.  The last cell's rails are not used.
//
// Rails are sized per cut: after t bits of Z at most 2^t sub-functions can
// remain, so the cut after cell c carries min(RAIL_W, (c+1) * CELL_BITS)
// rail bits, and the last cell carries none.  Cell memories grow along the
// cascade and stop growing once RAIL_W is reached.
//
// Every LUT cell is a RAM (nfg_ram) written through the lut_* port: word
// {rails_out, arail} at address {rails_in, z_bits} of cell lut_cell (cell 0
// is addressed by its z bits alone).  Both fields are right-aligned in
// their full-width port fields; bits a cell does not have are ignored.
// Computing the tables from a segmentation is done at design time.
//
// Timing: one LUT cell per pipeline stage, the Arail sum is accumulated
// alongside, and the segment number is registered once more at the end:
// seg and seg_valid appear NCELL + 1 clocks after x, y and in_valid.  One
// new input per clock.
//
// From the method: the interleaved variable order, rails and Arails, the
// adders, rails sized per cut.  This design's choice: CELL_BITS, the width of
// the cut (bounded by RAIL_W), modular Arails and the pipeline registers.
module seg_index_encoder #(
  parameter int unsigned N         = 12,  // bits per input
  parameter int unsigned SEG_W     = 14,  // segment number width (Arails too)
  parameter int unsigned RAIL_W    = 14,  // rails between cells
  parameter int unsigned CELL_BITS = 2,   // Z bits per cell
  localparam int unsigned NCELL    = (2 * N) / CELL_BITS,
  localparam int unsigned LUT_AW   = RAIL_W + CELL_BITS,
  localparam int unsigned LUT_DW   = RAIL_W + SEG_W,
  localparam int unsigned CELL_SW  = (NCELL > 1) ? $clog2(NCELL) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // evaluation
  input  logic               in_valid,
  input  logic [N-1:0]       x,
  input  logic [N-1:0]       y,
  output logic               seg_valid,
  output logic [SEG_W-1:0]   seg,
  // table loading
  input  logic               lut_we,
  input  logic [CELL_SW-1:0] lut_cell,
  input  logic [LUT_AW-1:0]  lut_waddr,
  input  logic [LUT_DW-1:0]  lut_wdata
);

  localparam int unsigned ZW = 2 * N;

  // Interleave X and Y, x bit first at every position.
  logic [ZW-1:0] z;
  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      z[2 * i + 1] = x[i];
      z[2 * i]     = y[i];
    end
  end

  // Rails entering cell c: after c * CELL_BITS bits of Z at most
  // 2^(c * CELL_BITS) sub-functions can remain, so the cut needs no more
  // than that many rail bits, and never more than RAIL_W.
  function automatic int unsigned rails_at(int unsigned c);
    if (c == 0 || c >= NCELL) return 0;
    return (c * CELL_BITS < RAIL_W) ? c * CELL_BITS : RAIL_W;
  endfunction

  // Pipeline of the Z bits still to be consumed: zp[c] is Z delayed by c.
  logic [ZW-1:0]     zp    [NCELL];
  // Cell outputs (registered inside the RAM), zero-extended to full width.
  logic [RAIL_W-1:0] rail_q  [NCELL];
  logic [SEG_W-1:0]  arail_q [NCELL];
  // Running Arail sum: acc[c] holds the sum of cells 0..c-1, aligned with
  // cell c's output.
  logic [SEG_W-1:0]  acc   [NCELL];
  logic [NCELL:0]    vp;

  assign zp[0] = z;
  assign acc[0] = '0;

  for (genvar c = 0; c < int'(NCELL); c++) begin : g_cell
    localparam int unsigned ZHI = ZW - 1 - c * CELL_BITS;
    localparam int unsigned RI  = rails_at(c);       // rails in
    localparam int unsigned RO  = rails_at(c + 1);   // rails out
    localparam int unsigned AWC = RI + CELL_BITS;
    localparam int unsigned DWC = RO + SEG_W;
    logic [AWC-1:0] raddr;
    logic [DWC-1:0] rdata, wdata_c;
    logic           we_c;

    if (c == 0) begin : g_first
      assign raddr = zp[0][ZHI -: CELL_BITS];
    end else begin : g_next
      assign raddr = {rail_q[c-1][RI-1:0], zp[c][ZHI -: CELL_BITS]};
    end

    if (RO > 0) begin : g_rails
      assign wdata_c   = {lut_wdata[SEG_W +: RO], lut_wdata[SEG_W-1:0]};
      assign rail_q[c] = RAIL_W'(rdata[DWC-1 -: RO]);
    end else begin : g_norails
      assign wdata_c   = lut_wdata[SEG_W-1:0];
      assign rail_q[c] = '0;
    end
    assign arail_q[c] = rdata[SEG_W-1:0];

    assign we_c = lut_we && (lut_cell == CELL_SW'(c));

    nfg_ram #(.DW(DWC), .AW(AWC)) u_lut (
      .clk   (clk),
      .we    (we_c),
      .waddr (lut_waddr[AWC-1:0]),
      .wdata (wdata_c),
      .raddr (raddr),
      .rdata (rdata)
    );

    if (c + 1 < int'(NCELL)) begin : g_pipe
      always_ff @(posedge clk) begin
        zp[c+1]  <= zp[c];
        acc[c+1] <= (c == 0) ? arail_q[c] : acc[c] + arail_q[c];
      end
    end
  end

  always_ff @(posedge clk) seg <= acc[NCELL-1] + arail_q[NCELL-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vp <= '0;
    else        vp <= {vp[NCELL-1:0], in_valid};
  end
  assign seg_valid = vp[NCELL];

  initial begin
    assert ((2 * N) % CELL_BITS == 0)
      else $error("CELL_BITS must divide 2*N");
  end

endmodule
