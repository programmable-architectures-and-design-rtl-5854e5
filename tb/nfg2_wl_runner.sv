// nfg2_wl_runner: runs one evaluated function on an nfg2_top instance of
// any size, for workload testbenches that need several instance sizes.
//
// When start rises, it segments function FID with the recursive planar
// segmentation (bilinear fit through the corners, error centred by the
// correction value, split while the error is not below EPS and the
// square is wider than one input unit), and, with SYM set, also with
// mirror segments sharing a word.  It loads the tables through the
// configuration port, checks that the segment counts are within TOL (30 %
// unless set) of the published ones (P_REC, P_SYM), and evaluates NPTS random inputs of
// the function's domain on the recursive and the symmetric generators.
// Each result must be within BOUND of the real function.  It also prints
// the uniform segment count at the same accuracy and the memory a
// generator fitted to this one function would need (rails and segment
// numbers only as wide as this segmentation requires).  The uniform
// generator is left unloaded: these functions need more uniform squares
// than the instance holds.  Then done rises, and checks and failures hold
// the counts.  All inputs and outputs of the instance follow its own
// timing (results NCELL + 5 clocks after the input).
module nfg2_wl_runner #(
  parameter int  N      = 14,
  parameter int  SEGW   = 15,
  parameter int  FID    = 5,
  parameter bit  SYM    = 1'b1,
  parameter int  P_REC  = 0,
  parameter int  P_SYM  = 0,
  parameter real EPS    = 1.0 / 16384.0,
  parameter real BOUND  = 1.0 / 16384.0 + 1.0 / 8192.0 + 1.0 / 262144.0,
  parameter int  NPTS   = 40000,
  parameter int  CW     = nfg2_pkg::COEF_W,
  parameter int  OW     = nfg2_pkg::OUT_W,
  parameter real TOL    = 0.3
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  import nfg2_pkg::*;
  import nfg2_tb_pkg::*;
  // The uniform generator is not used, but it must be a legal size.
  localparam int UB = (N >= UNI_BITS + 2) ? UNI_BITS : N / 2;
  localparam int RAILW = SEGW, CELLB = CELL_BITS;
  localparam int CF = COEF_F, OF = OUT_F;
  localparam int NCELL = 2 * N / CELLB;
  localparam int LAT_R = NCELL + 5;
  localparam int CELL_SW = $clog2(NCELL);
  localparam int LUT_AW = RAILW + CELLB;
  localparam int CFG_AW = (2 * UB > SEGW) ? ((2 * UB > LUT_AW) ? 2 * UB : LUT_AW)
                                          : ((SEGW > LUT_AW) ? SEGW : LUT_AW);
  localparam int CFG_DW = 2 * N + 4 * CW;

  logic rst_n = 0, in_valid = 0;
  logic [N-1:0] x = '0, y = '0;
  logic uni_valid, rec_valid, sym_valid;
  logic signed [OW-1:0] uni_out, rec_out, sym_out;
  logic cfg_we = 0;
  arch_e cfg_arch = ARCH_REC;
  cfg_target_e cfg_target = CFG_COEF;
  logic [CELL_SW-1:0] cfg_cell = '0;
  logic [CFG_AW-1:0] cfg_addr = '0;
  logic [CFG_DW-1:0] cfg_data = '0;
  logic [N-1:0] xq[$], yq[$];
  real maxerr_r = 0.0, maxerr_s = 0.0;
  int lat_err = 0;

  nfg2_top #(.N(N), .UB(UB), .SEGW(SEGW), .RAILW(RAILW), .CW(CW), .OW(OW)) dut (.*);

  initial begin done = 0; checks = 0; failures = 0; end

  function automatic void judge(string name, logic signed [OW-1:0] o, logic [N-1:0] xi,
                                logic [N-1:0] yi, ref real maxerr);
    real u = real'(xi) / real'(longint'(1) << N), v = real'(yi) / real'(longint'(1) << N);
    real e = real'(o) / real'(1 << OF) - fval(FID, u, v);
    if ((open_x(FID) && xi == 0) || (open_y(FID) && yi == 0) || out_dom(FID, u, v)) return;
    if (e < 0) e = -e;
    if (e > maxerr) maxerr = e;
    checks++;
    if (e > BOUND) begin
      failures++;
      if (failures < 10) $display("f%0d %s (%0d,%0d): error %g", FID, name, xi, yi, e);
    end
  endfunction

  always @(negedge clk) if (rst_n && rec_valid) begin
    automatic logic [N-1:0] xi = xq.pop_front(), yi = yq.pop_front();
    judge("recursive", rec_out, xi, yi, maxerr_r);
    if (SYM) judge("symmetric", sym_out, xi, yi, maxerr_s);
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

  function automatic bit near(int got, int paper);
    return (paper == 0) || (real'(got) >= (1.0 - TOL) * paper && real'(got) <= (1.0 + TOL) * paper);
  endfunction

  // Largest input code inside the domain.
  function automatic int top_code();
    int m = (1 << N) - 1;
    while (out_dom(FID, real'(m) / real'(1 << N), 0.0)) m--;
    return m;
  endfunction

  function automatic int clog2i(int v);
    int r = 0;
    while ((longint'(1) << r) < longint'(v)) r++;
    return r;
  endfunction

  // Bits of a generator fitted to segmentation s: LUT cells with rails
  // ceil(log2(values used)) wide, plus the coefficients memory.
  function automatic longint fitted_bits(QuadSeg s);
    longint bits = 0;
    int sw = clog2i(s.nseg);
    for (int c = 0; c < NCELL; c++) begin
      int ri = (c == 0) ? 0 : clog2i(s.rails_used(c * CELLB / 2));
      int ro = (c == NCELL - 1) ? 0 : clog2i(s.rails_used((c + 1) * CELLB / 2));
      bits += (longint'(1) << (ri + CELLB)) * longint'(ro + sw);
    end
    return bits + longint'(s.nseg) * (2 * N + 4 * CW);
  endfunction

  initial begin
    QuadSeg qr, qs;
    int hi;
    longint uni;
    wait (start);
    repeat (3) @(negedge clk);
    rst_n = 1;
    qr = new(N); qr.segment(0, FID, EPS, 0); qr.number(0);
    if (SYM) begin
      qs = new(N); qs.segment(0, FID, EPS, 1); qs.mirror(0); qs.number(1);
    end else qs = qr;
    $display("f%0d at %0d input bits: segments recursive %0d (published %0d), symmetric %0d (published %0d)",
             FID, N, qr.nleaves, P_REC, SYM ? qs.nseg : 0, P_SYM);
    uni = longint'((1 << N) / qr.min_side());
    uni = uni * uni;
    $display("f%0d at %0d input bits: uniform %0d segments; fitted memory uniform %0d, recursive %0d, symmetric %0d bits",
             FID, N, uni, uni * (4 * CW), fitted_bits(qr), fitted_bits(qs));
    checks++;
    if (!near(qr.nleaves, P_REC) || (SYM && !near(qs.nseg, P_SYM))) begin
      failures++; $display("f%0d: segment count far from the published one", FID);
    end
    checks++;
    if (qr.nseg > (1 << SEGW) || qs.nseg > (1 << SEGW) ||
        !qr.rails_fit(CELLB, RAILW) || !qs.rails_fit(CELLB, RAILW)) begin
      failures++; $display("f%0d: does not fit", FID);
    end else begin
      load_tree(ARCH_REC, qr);
      load_tree(ARCH_SYM, qs);
      hi = top_code();
      for (int i = 0; i < NPTS; i++) begin
        @(negedge clk);
        in_valid = 1;
        x = N'($urandom_range(hi)); y = N'($urandom_range(hi));
        if (i % 16 == 0) begin x = N'($urandom_range(63)); y = N'($urandom_range(63)); end
        xq.push_back(x); yq.push_back(y);
      end
      @(negedge clk); in_valid = 0;
      repeat (LAT_R + 2) @(negedge clk);
      checks++;
      if (xq.size() != 0) begin failures++; $display("f%0d: missing results", FID); end
      $display("f%0d: max error recursive %g, symmetric %g (bound %g)", FID, maxerr_r, maxerr_s, BOUND);
    end
    done = 1;
  end
endmodule
