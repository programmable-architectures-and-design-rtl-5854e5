// tb_nfg2_workload: the evaluated functions at 8-bit accuracy (inputs with 8
// fractional bits, acceptable approximation error 2^-10) on all three
// generators.
//
// For each function the recursive planar segmentation is computed here:
// bilinear interpolation through the four corners of a square, the error
// centred by a correction value, and a split into four squares while the
// error is not below 2^-10 and the square is wider than one unit.  For the
// symmetric functions the segmentation is also made with mirror segments
// sharing a word.  The uniform generator gets the same fit on its
// 128 x 128 grid.  Segment counts are printed beside the published ones
// (recursive / symmetric / uniform) and must be within 30 % of them.  Then
// every one of the 65,536 input points is evaluated by the hardware and
// compared with the real function: the error may not exceed 2^-10 (the
// approximation) plus 2^-12 (coefficient and output rounding).
module tb_nfg2_workload;
  import nfg2_pkg::*;
  import nfg2_tb_pkg::*;
  localparam int N = 8, UB = 7, SEGW = 12, RAILW = 12, CELLB = 2;
  localparam int CW = COEF_W, CF = COEF_F, OW = OUT_W, OF = OUT_F;
  localparam int NCELL = 2 * N / CELLB;
  localparam int LAT_U = 4, LAT_R = NCELL + 5;
  localparam int CELL_SW = $clog2(NCELL);
  localparam int LUT_AW = RAILW + CELLB, LUT_DW = RAILW + SEGW;
  localparam int CFG_AW = 14;
  localparam int CFG_DW = 2 * N + 4 * CW;
  localparam int SIDE = 1 << (N - UB);
  localparam real EPS_A = 1.0 / 1024.0;
  localparam real BOUND = 1.0 / 1024.0 + 1.0 / 4096.0;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [N-1:0] x = '0, y = '0;
  logic uni_valid, rec_valid, sym_valid;
  logic signed [OW-1:0] uni_out, rec_out, sym_out;
  logic cfg_we = 0;
  arch_e cfg_arch = ARCH_UNI;
  cfg_target_e cfg_target = CFG_COEF;
  logic [CELL_SW-1:0] cfg_cell = '0;
  logic [CFG_AW-1:0] cfg_addr = '0;
  logic [CFG_DW-1:0] cfg_data = '0;

  int checks = 0, failures = 0;
  int fid_now = 0;
  bit sym_now = 0;
  real maxerr_u, maxerr_r, maxerr_s;
  logic [N-1:0] xq_u[$], yq_u[$], xq_r[$], yq_r[$];

  nfg2_top #(.N(N), .UB(UB), .SEGW(SEGW), .RAILW(RAILW), .CELLB(CELLB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void judge(string name, logic signed [OW-1:0] o, logic [N-1:0] xi,
                                logic [N-1:0] yi, ref real maxerr);
    real fx = fval(fid_now, real'(xi) / 256.0, real'(yi) / 256.0);
    real e = real'(o) / real'(1 << OF) - fx;
    if ((open_x(fid_now) && xi == 0) || (open_y(fid_now) && yi == 0)) return;  // outside the domain
    if (e < 0) e = -e;
    if (e > maxerr) maxerr = e;
    checks++;
    if (e > BOUND) begin
      failures++;
      if (failures < 10) $display("f%0d %s (%0d,%0d): error %g", fid_now, name, xi, yi, e);
    end
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (uni_valid) judge("uniform", uni_out, xq_u.pop_front(), yq_u.pop_front(), maxerr_u);
    if (rec_valid) begin
      automatic logic [N-1:0] xi = xq_r.pop_front(), yi = yq_r.pop_front();
      judge("recursive", rec_out, xi, yi, maxerr_r);
      if (sym_now) judge("symmetric", sym_out, xi, yi, maxerr_s);
    end
  end

  task automatic cfg_write(arch_e a, cfg_target_e t, int cidx, int addr, logic [CFG_DW-1:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_arch = a; cfg_target = t; cfg_cell = CELL_SW'(cidx);
    cfg_addr = CFG_AW'(addr); cfg_data = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic load_tree(arch_e a, QuadSeg s);
    int rail, arail;
    for (int b = 0; b < (1 << CELLB); b++) begin
      s.lut_entry(0, CELLB, 0, b, rail, arail);
      cfg_write(a, CFG_LUT, 0, b, CFG_DW'({RAILW'(rail), SEGW'(arail)}));
    end
    for (int c = 1; c < NCELL; c++) begin
      int d = c * CELLB / 2;
      if (s.leafc[d]) for (int b = 0; b < (1 << CELLB); b++) begin
        s.lut_entry(c, CELLB, -1, b, rail, arail);
        cfg_write(a, CFG_LUT, c, b, CFG_DW'({RAILW'(rail), SEGW'(arail)}));
      end
      for (int v = 0; v < s.leaf.size(); v++)
        if (!s.leaf[v] && s.depth[v] == d)
          for (int b = 0; b < (1 << CELLB); b++) begin
            s.lut_entry(c, CELLB, v, b, rail, arail);
            cfg_write(a, CFG_LUT, c, (s.nodeid[v] << CELLB) | b, CFG_DW'({RAILW'(rail), SEGW'(arail)}));
          end
    end
    for (int v = 0; v < s.leaf.size(); v++)
      if (s.leaf[v] && s.rep[v] == v)
        cfg_write(a, CFG_COEF, 0, s.idx[v],
                  CFG_DW'({N'(s.bx[v]), N'(s.by[v]), CW'(qcoef(s.fcxy[v], CF)), CW'(qcoef(s.fcx[v], CF)),
                           CW'(qcoef(s.fcy[v], CF)), CW'(qcoef(s.fc0[v], CF))}));
  endtask

  task automatic load_uniform(int fid);
    real a, b, c, d, e;
    for (int i = 0; i < (1 << UB); i++)
      for (int j = 0; j < (1 << UB); j++) begin
        fit_square(fid, N, i * SIDE, j * SIDE, SIDE, a, b, c, d, e);
        cfg_write(ARCH_UNI, CFG_COEF, 0, i * (1 << UB) + j,
                  CFG_DW'({CW'(qcoef(a, CF)), CW'(qcoef(b, CF)), CW'(qcoef(c, CF)), CW'(qcoef(d, CF))}));
      end
  endtask

  function automatic bit near(int got, int paper);
    return (paper == 0) || (real'(got) >= 0.7 * paper && real'(got) <= 1.3 * paper);
  endfunction

  task automatic run(int fid, bit sym, int p_rec, int p_sym, int p_uni);
    QuadSeg qr, qs;
    int uni;
    fid_now = fid; sym_now = sym;
    maxerr_u = 0; maxerr_r = 0; maxerr_s = 0;
    qr = new(N); qr.segment(0, fid, EPS_A, 0); qr.number(0);
    uni = ((1 << N) / qr.min_side()) * ((1 << N) / qr.min_side());
    if (sym) begin
      qs = new(N); qs.segment(0, fid, EPS_A, 1); qs.mirror(0); qs.number(1);
    end else qs = qr;
    $display("f%0d: segments recursive %0d (published %0d), symmetric %0d (published %0d), uniform %0d (published %0d)",
             fid, qr.nleaves, p_rec, sym ? qs.nseg : 0, p_sym, uni, p_uni);
    checks++;
    if (!near(qr.nleaves, p_rec) || (sym && !near(qs.nseg, p_sym)) || uni != p_uni) begin
      failures++; $display("f%0d: segment count far from the published one", fid);
    end
    checks++;
    if (qr.nseg > (1 << SEGW) || qs.nseg > (1 << SEGW) ||
        !qr.rails_fit(CELLB, RAILW) || !qs.rails_fit(CELLB, RAILW)) begin
      failures++; $display("f%0d: does not fit", fid);
    end
    load_uniform(fid);
    load_tree(ARCH_REC, qr);
    load_tree(ARCH_SYM, qs);
    for (int i = 0; i < (1 << (2 * N)); i++) begin
      @(negedge clk);
      in_valid = 1;
      x = N'(i >> N); y = N'(i);
      xq_u.push_back(x); yq_u.push_back(y); xq_r.push_back(x); yq_r.push_back(y);
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT_R + 2) @(negedge clk);
    $display("f%0d: max error uniform %g, recursive %g, symmetric %g (bound %g)",
             fid, maxerr_u, maxerr_r, maxerr_s, BOUND);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(1, 1, 508, 263, 1024);
    run(2, 0, 193, 0, 4096);
    run(4, 1, 256, 139, 4096);
    run(7, 1, 226, 121, 4096);
    run(8, 1, 232, 127, 4096);
    run(0, 0, 997, 0, 16384);
    checks++;
    if (xq_u.size() != 0 || xq_r.size() != 0) begin failures++; $display("missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
