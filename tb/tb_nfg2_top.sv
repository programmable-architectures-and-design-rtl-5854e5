// tb_nfg2_top: end-to-end test of the three generators at their default
// sizes (12-bit inputs, 16,384-word coefficients memories, 12-cell LUT
// cascades).  Through the single configuration port it loads
//   - the uniform NFG with random coefficients in all 128 x 128 squares,
//   - the recursive NFG with a random quadtree segmentation,
//   - the symmetric NFG with a mirrored segmentation (shared words),
// then streams random points, one per clock, into all three at once and
// checks every result against the exact polynomial of the segment holding
// the point, and its latency (4 and 17 clocks).  Then it switches function:
// all tables are reloaded with a new segmentation and new coefficients,
// without any other change, and the stream is checked again.
// Mechanisms counted (each must occur): back-to-back results, points in
// segments of at least three sizes, exchanged inputs (X > Y) in the
// symmetric NFG, mirror-segment and diagonal-segment points, and a function
// switch.
module tb_nfg2_top;
  import nfg2_pkg::*;
  import nfg2_tb_pkg::*;
  localparam int N = N_BITS, UB = UNI_BITS, SEGW = SEG_W, RAILW = RAIL_W, CELLB = CELL_BITS;
  localparam int CW = COEF_W, CF = COEF_F, OW = OUT_W, OF = OUT_F;
  localparam int NCELL = 2 * N / CELLB;
  localparam int LAT_U = 4, LAT_R = NCELL + 5;
  localparam int CELL_SW = $clog2(NCELL);
  localparam int LUT_AW = RAILW + CELLB, LUT_DW = RAILW + SEGW;
  localparam int CFG_AW = (2 * UB > SEGW) ? ((2 * UB > LUT_AW) ? 2 * UB : LUT_AW)
                                          : ((SEGW > LUT_AW) ? SEGW : LUT_AW);
  localparam int CFG_DW = (2 * N + 4 * CW > LUT_DW) ? 2 * N + 4 * CW : LUT_DW;
  localparam int SIDE = 1 << (N - UB);

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

  int checks = 0, failures = 0, cycle = 0;
  longint eq_u[$], eq_r[$], eq_s[$];
  int tq_u[$], tq_r[$], tq_s[$];
  // coefficients: uniform by address, recursive and symmetric by leaf
  longint u_cxy[1 << (2 * UB)], u_cx[1 << (2 * UB)], u_cy[1 << (2 * UB)], u_c0[1 << (2 * UB)];
  longint r_cxy[int], r_cx[int], r_cy[int], r_c0[int];
  longint s_cxy[int], s_cx[int], s_cy[int], s_c0[int];
  QuadSeg qr, qs;
  // mechanism counters
  int n_b2b = 0, n_swap = 0, n_mirror = 0, n_diag = 0, n_switch = 0;
  int depth_hits[N+1];
  logic prev_rec_valid = 0;

  nfg2_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(string name, logic v, longint got, ref longint eq[$], ref int tq[$], input int lat);
    longint e;
    int t;
    if (!v) return;
    e = eq.pop_front();
    t = tq.pop_front();
    checks++;
    if (got != e || cycle - t != lat) begin
      failures++;
      if (failures < 10) $display("%s: out %0d want %0d, latency %0d", name, got, e, cycle - t);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    check_one("uniform", uni_valid, longint'(uni_out), eq_u, tq_u, LAT_U);
    check_one("recursive", rec_valid, longint'(rec_out), eq_r, tq_r, LAT_R);
    check_one("symmetric", sym_valid, longint'(sym_out), eq_s, tq_s, LAT_R);
    if (rec_valid && prev_rec_valid) n_b2b++;
    prev_rec_valid <= rec_valid;
  end

  task automatic cfg_write(arch_e a, cfg_target_e t, int cidx, int addr, logic [CFG_DW-1:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_arch = a; cfg_target = t; cfg_cell = CELL_SW'(cidx);
    cfg_addr = CFG_AW'(addr); cfg_data = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic load_uniform();
    for (int a = 0; a < (1 << (2 * UB)); a++) begin
      u_cxy[a] = srand(CF + 2); u_cx[a] = srand(CF + 1); u_cy[a] = srand(CF + 1); u_c0[a] = srand(CF + 2);
      cfg_write(ARCH_UNI, CFG_COEF, 0, a,
                CFG_DW'({CW'(u_cxy[a]), CW'(u_cx[a]), CW'(u_cy[a]), CW'(u_c0[a])}));
    end
  endtask

  task automatic load_tree(arch_e a, QuadSeg s, bit sym, ref longint cxy[int], ref longint cx[int],
                           ref longint cy[int], ref longint c0[int]);
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
    cxy.delete(); cx.delete(); cy.delete(); c0.delete();
    for (int v = 0; v < s.leaf.size(); v++)
      if (s.leaf[v] && s.rep[v] == v) begin
        cxy[v] = srand(CF - 2); cx[v] = srand(CF + 1); c0[v] = srand(CF + 2);
        cy[v] = (sym && s.bx[v] == s.by[v]) ? cx[v] : srand(CF + 1);
        cfg_write(a, CFG_COEF, 0, s.idx[v],
                  CFG_DW'({N'(s.bx[v]), N'(s.by[v]), CW'(cxy[v]), CW'(cx[v]), CW'(cy[v]), CW'(c0[v])}));
      end
  endtask

  function automatic longint tree_expect(QuadSeg s, int xi, int yi, ref longint cxy[int],
                                         ref longint cx[int], ref longint cy[int], ref longint c0[int],
                                         input bit count);
    int l = s.find(xi, yi);
    int r = s.rep[l];
    if (count) begin
      depth_hits[s.depth[l]]++;
      if (s.bx[l] == s.by[l]) n_diag++;
      if (l != r) n_mirror++;
    end
    if (l != r)
      return ref_eval(cxy[r], cy[r], cx[r], c0[r], xi - s.bx[l], yi - s.by[l], N, CF, OW, OF);
    return ref_eval(cxy[r], cx[r], cy[r], c0[r], xi - s.bx[l], yi - s.by[l], N, CF, OW, OF);
  endfunction

  task automatic make_trees();
    do begin
      qr = new(N); qr.grow(0, N, 42, 0); qr.number(0);
    end while (qr.nseg > (1 << SEGW) || !qr.rails_fit(CELLB, RAILW) || qr.nseg < 100);
    do begin
      qs = new(N); qs.grow(0, N, 42, 1); qs.mirror(0); qs.number(1);
    end while (qs.nseg > (1 << SEGW) || !qs.rails_fit(CELLB, RAILW) || qs.nseg < 100);
    $display("recursive: %0d segments; symmetric: %0d segments in %0d words",
             qr.nleaves, qs.nleaves, qs.nseg);
  endtask

  task automatic stream(int count);
    for (int i = 0; i < count; i++) begin
      @(negedge clk);
      in_valid = (i < count / 2) ? 1'b1 : ($urandom_range(5) != 0);
      x = N'($urandom); y = N'($urandom);
      if (i % 7 == 0) y = x;  // the diagonal itself
      if (in_valid) begin
        automatic int si = int'(x) / SIDE, sj = int'(y) / SIDE;
        automatic int a = si * (1 << UB) + sj;
        eq_u.push_back(ref_eval(u_cxy[a], u_cx[a], u_cy[a], u_c0[a], int'(x) - si * SIDE,
                                int'(y) - sj * SIDE, N, CF, OW, OF));
        eq_r.push_back(tree_expect(qr, int'(x), int'(y), r_cxy, r_cx, r_cy, r_c0, 1'b1));
        eq_s.push_back(tree_expect(qs, int'(x), int'(y), s_cxy, s_cx, s_cy, s_c0, 1'b1));
        if (x > y) n_swap++;
        tq_u.push_back(cycle); tq_r.push_back(cycle); tq_s.push_back(cycle);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT_R + 2) @(negedge clk);
  endtask

  initial begin
    automatic int sizes = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // function 1
    make_trees();
    load_uniform();
    load_tree(ARCH_REC, qr, 0, r_cxy, r_cx, r_cy, r_c0);
    load_tree(ARCH_SYM, qs, 1, s_cxy, s_cx, s_cy, s_c0);
    stream(4000);
    // function 2: new RAM contents only
    make_trees();
    load_uniform();
    load_tree(ARCH_REC, qr, 0, r_cxy, r_cx, r_cy, r_c0);
    load_tree(ARCH_SYM, qs, 1, s_cxy, s_cx, s_cy, s_c0);
    n_switch++;
    stream(4000);

    for (int d = 0; d <= N; d++) if (depth_hits[d] > 0) sizes++;
    $display("back-to-back %0d, segment sizes %0d, swaps %0d, mirror %0d, diagonal %0d, switches %0d",
             n_b2b, sizes, n_swap, n_mirror, n_diag, n_switch);
    checks++;
    if (n_b2b == 0 || sizes < 3 || n_swap == 0 || n_mirror == 0 || n_diag == 0 || n_switch == 0) begin
      failures++; $display("a mechanism was not exercised");
    end
    checks++;
    if (eq_u.size() != 0 || eq_r.size() != 0 || eq_s.size() != 0) begin
      failures++; $display("missing results");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
