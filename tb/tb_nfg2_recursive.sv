// tb_nfg2_recursive: end-to-end test of the recursively segmented NFG at
// 8-bit inputs.  A random quadtree segmentation is made, the LUT cascade and
// the coefficients memory (corner and random coefficients of every segment)
// are loaded through the configuration ports, and random points are
// streamed one per clock.  Each result is compared with the segment's
// polynomial evaluated exactly at (X - Bx, Y - By), the segment being found
// by walking the tree, and must arrive NCELL + 5 clocks after its input.
// The tb also requires points in segments of at least three sizes.
module tb_nfg2_recursive;
  import nfg2_tb_pkg::*;
  localparam bit SYM = 0;
  localparam int N = 8, SEG_W = 10, RAIL_W = 8, CELL_BITS = 2;
  localparam int CW = 34, CF = 20, OUT_W = 16, OUT_F = 12;
  localparam int NCELL = 2 * N / CELL_BITS;
  localparam int LAT = NCELL + 5;
  localparam int CELL_SW = $clog2(NCELL);
  localparam int LUT_AW = RAIL_W + CELL_BITS, LUT_DW = RAIL_W + SEG_W;
  localparam int COEF_DW = 2 * N + 4 * CW;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [N-1:0] x = '0, y = '0;
  logic signed [OUT_W-1:0] out;
  logic coef_we = 0;
  logic [SEG_W-1:0] coef_waddr = '0;
  logic [COEF_DW-1:0] coef_wdata = '0;
  logic lut_we = 0;
  logic [CELL_SW-1:0] lut_cell = '0;
  logic [LUT_AW-1:0] lut_waddr = '0;
  logic [LUT_DW-1:0] lut_wdata = '0;
  int checks = 0, failures = 0, cycle = 0;
  longint expq[$];
  int tq[$];
  int depth_hits[N+1];
  int diag_hits = 0, mirror_hits = 0;
  longint cxy[int], cx[int], cy[int], c0[int];
  QuadSeg q;

  nfg2_recursive #(.N(N), .SEG_W(SEG_W), .RAIL_W(RAIL_W), .CELL_BITS(CELL_BITS),
                   .CW(CW), .CF(CF), .OUT_W(OUT_W), .OUT_F(OUT_F)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    automatic longint e = expq.pop_front();
    automatic int t = tq.pop_front();
    checks++;
    if (longint'(out) != e || cycle - t != LAT) begin
      failures++;
      if (failures < 10) $display("out %0d want %0d, latency %0d", out, e, cycle - t);
    end
  end

  task automatic write_lut(int c, int addr, int rail, int arail);
    @(negedge clk);
    lut_we = 1; lut_cell = CELL_SW'(c); lut_waddr = LUT_AW'(addr);
    lut_wdata = {RAIL_W'(rail), SEG_W'(arail)};
    @(negedge clk);
    lut_we = 0;
  endtask

  task automatic load_tables(QuadSeg s);
    int rail, arail;
    for (int b = 0; b < (1 << CELL_BITS); b++) begin
      s.lut_entry(0, CELL_BITS, 0, b, rail, arail);
      write_lut(0, b, rail, arail);
    end
    for (int c = 1; c < NCELL; c++) begin
      int d = c * CELL_BITS / 2;
      if (s.leafc[d]) for (int b = 0; b < (1 << CELL_BITS); b++) begin
        s.lut_entry(c, CELL_BITS, -1, b, rail, arail);
        write_lut(c, b, rail, arail);
      end
      for (int v = 0; v < s.leaf.size(); v++)
        if (!s.leaf[v] && s.depth[v] == d)
          for (int b = 0; b < (1 << CELL_BITS); b++) begin
            s.lut_entry(c, CELL_BITS, v, b, rail, arail);
            write_lut(c, (s.nodeid[v] << CELL_BITS) | b, rail, arail);
          end
    end
    // one coefficients word per stored segment
    for (int v = 0; v < s.leaf.size(); v++)
      if (s.leaf[v] && s.rep[v] == v) begin
        cxy[v] = srand(CF - 1); cx[v] = srand(CF + 1); c0[v] = srand(CF + 2);
        cy[v] = (SYM && s.bx[v] == s.by[v]) ? cx[v] : srand(CF + 1);
        @(negedge clk);
        coef_we = 1; coef_waddr = SEG_W'(s.idx[v]);
        coef_wdata = {N'(s.bx[v]), N'(s.by[v]), CW'(cxy[v]), CW'(cx[v]), CW'(cy[v]), CW'(c0[v])};
        @(negedge clk);
        coef_we = 0;
      end
  endtask

  // Value of the polynomial of the leaf holding (xi, yi).
  function automatic longint expected(QuadSeg s, int xi, int yi);
    int l = s.find(xi, yi);
    int r = s.rep[l];
    depth_hits[s.depth[l]]++;
    if (s.bx[l] == s.by[l]) diag_hits++;
    if (l != r) begin
      // mirror segment: g(X,Y) = g_r(Y,X), so Cx and Cy change places
      mirror_hits++;
      return ref_eval(cxy[r], cy[r], cx[r], c0[r], xi - s.bx[l], yi - s.by[l], N, CF, OUT_W, OUT_F);
    end
    return ref_eval(cxy[r], cx[r], cy[r], c0[r], xi - s.bx[l], yi - s.by[l], N, CF, OUT_W, OUT_F);
  endfunction

  task automatic stream(QuadSeg s, int count);
    for (int i = 0; i < count; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(7) != 0);
      x = N'($urandom); y = N'($urandom);
      if (in_valid) begin
        expq.push_back(expected(s, int'(x), int'(y)));
        tq.push_back(cycle);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
  endtask

  initial begin
    automatic int sizes = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    do begin
      q = new(N);
      q.grow(0, N, 45, SYM);
      if (SYM) q.mirror(0);
      q.number(SYM);
    end while (q.nseg > (1 << SEG_W) || !q.rails_fit(CELL_BITS, RAIL_W) || q.nseg < 40);
    $display("%0d segments, %0d coefficient words", q.nleaves, q.nseg);
    load_tables(q);
    stream(q, 4000);
    for (int d = 0; d <= N; d++) if (depth_hits[d] > 0) sizes++;
    $display("segment sizes hit %0d, diagonal hits %0d, mirror hits %0d", sizes, diag_hits, mirror_hits);
    checks++;
    if (expq.size() != 0 || sizes < 3 || (SYM && (mirror_hits == 0 || diag_hits == 0))) begin
      failures++;
      $display("missing results or mechanisms not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
