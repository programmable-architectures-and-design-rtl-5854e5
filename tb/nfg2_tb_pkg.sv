// nfg2_tb_pkg: test support for the two-variable NFGs.
//
// Segmentation: a quadtree over the square of N-bit inputs.  A node at depth
// d covers 2^(N-d) x 2^(N-d) points with lower corner (bx, by).  Leaves are
// segments.  Segment numbers follow the interleaved order of X and Y (x bit
// before y bit at each level), which is the order a depth-first walk with
// children numbered 2*xbit + ybit produces.  In the symmetric numbering the
// leaves on or above the diagonal (bx <= by) are numbered that way and every
// leaf below takes the number of its mirror.
//
// LUT tables for the segment index encoder are derived from the tree, not
// from the encoder: the rail value at a cut at depth d names the internal
// node reached there (1, 2, ...) or 0 once a leaf has been entered; the
// Arail of a cell is base(after) - base(before), base(region) being the
// segment number at the region's lower corner.  The sum of the Arails then
// telescopes to the segment number.  CELL_BITS must be even.
//
// Reference arithmetic: the bilinear polynomial evaluated exactly in 64-bit
// integers, rounded to nearest (ties upward) and saturated, independently of
// the RTL's pipeline and of its AND-gate offsets.
package nfg2_tb_pkg;

  class QuadSeg;
    int n;                 // bits per input
    // node arrays
    bit leaf[$];           // 1 = leaf
    int depth[$];
    int bx[$], by[$];
    int child[$][4];
    int idx[$];            // segment number of a leaf
    int rep[$];            // leaf whose coefficients word it uses
    int nodeid[$];         // rail value of an internal node at its depth
    bit leafc[$];          // per depth: does rail value 0 mean inside a leaf
    int nseg;              // number of coefficient words
    int nleaves;

    function new(int n_bits);
      n = n_bits;
      void'(add_node(0, 0, 0));
    endfunction

    function int add_node(int d, int x0, int y0);
      int c[4] = '{-1, -1, -1, -1};
      leaf.push_back(1); depth.push_back(d);
      bx.push_back(x0); by.push_back(y0);
      child.push_back(c); idx.push_back(0); rep.push_back(0);
      nodeid.push_back(0);
      return leaf.size() - 1;
    endfunction

    function int side(int v);
      return 1 << (n - depth[v]);
    endfunction

    // Split leaf v into four.
    function void split(int v);
      int h = side(v) / 2;
      int c[4];
      for (int q = 0; q < 4; q++)
        c[q] = add_node(depth[v] + 1, bx[v] + ((q >> 1) * h), by[v] + ((q & 1) * h));
      child[v] = c;
      leaf[v] = 0;
    endfunction

    // Leaf that holds point (x, y).
    function int find(int x, int y);
      int v = 0;
      while (!leaf[v]) begin
        int h = side(v) / 2;
        int q = (((x - bx[v]) >= h) ? 2 : 0) + (((y - by[v]) >= h) ? 1 : 0);
        v = child[v][q];
      end
      return v;
    endfunction

    // Random tree; with sym = 1 the split decisions are mirrored so that the
    // segmentation is symmetric.  pct: chance (percent) of splitting.
    function void grow(int v, int maxd, int pct, bit sym);
      if (depth[v] >= maxd) return;
      if (depth[v] > 0 && int'($urandom_range(99)) >= pct) return;
      if (sym && bx[v] > by[v]) return;  // mirrored from the upper half
      split(v);
      for (int q = 0; q < 4; q++) grow(child[v][q], maxd, pct, sym);
    endfunction

    // Mirror the upper-half subtrees into the lower half.
    function void mirror(int v);
      if (leaf[v]) return;
      for (int q = 0; q < 4; q++) begin
        int c = child[v][q];
        if (bx[c] < by[c]) copy_mirror(c, child[v][((q & 1) << 1) | (q >> 1)]);
        else if (bx[c] == by[c]) mirror(c);
      end
    endfunction

    function void copy_mirror(int src, int dst);
      if (leaf[src]) return;
      if (leaf[dst]) split(dst);
      for (int q = 0; q < 4; q++)
        copy_mirror(child[src][q], child[dst][((q & 1) << 1) | (q >> 1)]);
    endfunction

    // Recursive planar segmentation: split a square into four while the
    // centred bilinear error is not below eps and the side exceeds one unit.
    // With sym = 1 the squares below the diagonal are left to mirror().
    real fcxy[int], fcx[int], fcy[int], fc0[int];
    function void segment(int v, int fid, real eps, bit sym);
      real a, b, c, d, e;
      if (sym && bx[v] > by[v]) return;
      fit_square(fid, n, bx[v], by[v], side(v), a, b, c, d, e, (side(v) > 1) ? eps : 1.0e30);
      fcxy[v] = a; fcx[v] = b; fcy[v] = c; fc0[v] = d;
      if (e < eps || side(v) <= 1) return;
      split(v);
      for (int q = 0; q < 4; q++) segment(child[v][q], fid, eps, sym);
    endfunction

    function int min_side();
      int m = 1 << n;
      for (int v = 0; v < leaf.size(); v++) if (leaf[v] && side(v) < m) m = side(v);
      return m;
    endfunction

    // Uniform tree to depth d.
    function void grow_uniform(int v, int d);
      if (depth[v] >= d) return;
      split(v);
      for (int q = 0; q < 4; q++) grow_uniform(child[v][q], d);
    endfunction

    function void number_dfs(int v, bit sym);
      if (leaf[v]) begin
        if (!sym || bx[v] <= by[v]) begin
          idx[v] = nseg; rep[v] = v; nseg++;
        end
        nleaves++;
        return;
      end
      for (int q = 0; q < 4; q++) number_dfs(child[v][q], sym);
    endfunction

    function void number(bit sym);
      nseg = 0; nleaves = 0;
      number_dfs(0, sym);
      if (sym)
        for (int v = 0; v < leaf.size(); v++)
          if (leaf[v] && bx[v] > by[v]) begin
            int m = find(by[v], bx[v]);
            idx[v] = idx[m]; rep[v] = m;
          end
      // rail values at the cut of depth d: 0 for "inside a leaf" when some
      // leaf is that shallow, then the internal nodes of depth d
      leafc = {};
      for (int d = 0; d <= n; d++) begin
        bit lc = 0;
        for (int v = 0; v < leaf.size(); v++)
          if (leaf[v] && depth[v] <= d) lc = 1;
        leafc.push_back(lc);
      end
      for (int d = 0; d <= n; d++) begin
        int k = leafc[d] ? 1 : 0;
        for (int v = 0; v < leaf.size(); v++)
          if (!leaf[v] && depth[v] == d) begin nodeid[v] = k; k++; end
      end
    endfunction

    // Number of rail values used at the cut of depth d.
    function int rails_used(int d);
      int k = leafc[d] ? 1 : 0;
      for (int v = 0; v < leaf.size(); v++)
        if (!leaf[v] && depth[v] == d) k++;
      return k;
    endfunction

    // Largest rail count over all cuts (call number() first).
    function int max_rails();
      int m = 0;
      for (int d = 0; d <= n; d++)
        if (rails_used(d) > m) m = rails_used(d);
      return m;
    endfunction

    // Do the rail values fit the encoder, whose cut after c cells of g Z
    // bits carries min(railw, c * g) bits?
    function bit rails_fit(int g, int railw);
      for (int c = 1; c < 2 * n / g; c++) begin
        int w = (c * g < railw) ? c * g : railw;
        if (rails_used(c * g / 2) > (1 << w)) return 0;
      end
      return 1;
    endfunction

    function int seg_of(int x, int y);
      return idx[find(x, y)];
    endfunction

    // LUT word for cell c (consuming levels c*g/2 .. (c+1)*g/2 - 1) when the
    // region before the cell is node v (v = -1: inside a leaf) and the
    // cell's Z bits are b.  Returns rails_out and arail.
    function void lut_entry(int c, int g, int v, int b, output int rail, output int arail);
      int u = v;
      int base0;
      if (v < 0) begin rail = 0; arail = 0; return; end
      base0 = (c == 0) ? 0 : seg_of(bx[v], by[v]);
      for (int l = g / 2 - 1; l >= 0; l--) begin
        int q = (b >> (2 * l)) & 3;
        if (leaf[u]) break;
        u = child[u][q];
      end
      if (leaf[u]) rail = 0;
      else         rail = nodeid[u];
      arail = seg_of(bx[u], by[u]) - base0;
    endfunction
  endclass

  // Test functions of the evaluation (numbering as in the literature's table
  // of two-variable functions); inputs in [0,1].  Functions 5 (WaveRings on
  // [0,pi]^2) and 6 (Sombrero on (0,8)^2) have integer input bits: their
  // unit inputs are scaled by 4 and 8, so with N = 14 and 15 the input LSB
  // is 2^-12 of the real argument.
  function automatic real fval(int fid, real x, real y);
    real r;
    case (fid)
      3: begin r = $sqrt(x * x + y * y); return (r == 0.0) ? 0.0 : 1.0 / r; end
      5: begin r = 16.0 * (x * x + y * y); return $cos($sqrt(r)) / $sqrt(r + 0.25); end
      6: begin r = 8.0 * $sqrt(x * x + y * y); return (r == 0.0) ? 1.0 : $sin(r) / r; end
      0: return $sin(3.14159265358979 * x) * $sqrt(y);
      1: return $sin(3.14159265358979 * x * y);
      2: return $pow(x, 4.0) * $pow(y, 5.0);
      4: begin r = $sqrt(x * x + y * y); return (r == 0.0) ? 0.0 : x * y / r; end
      7: return $sqrt(x * x + y * y);
      8: return $pow(x * x * x + y * y * y, 1.0 / 3.0);
      default: return 0.0;
    endcase
  endfunction

  // Functions whose published domain is open at 0 in X / in Y: those input
  // points lie outside the domain and are not fitted or checked.
  function automatic bit open_x(int fid); return fid == 3 || fid == 4 || fid == 6 || fid == 7 || fid == 8; endfunction
  function automatic bit open_y(int fid); return fid == 0 || fid == 3 || fid == 4 || fid == 6 || fid == 7 || fid == 8; endfunction

  // Unit-input points beyond a domain's upper bound (WaveRings stops at pi).
  function automatic bit out_dom(int fid, real x, real y);
    return fid == 5 && (4.0 * x > 3.14159265358979 || 4.0 * y > 3.14159265358979);
  endfunction

  // Bilinear interpolation of f on the square with lower corner (bxi, byi)
  // and side s units of 2^-n, in offset form, plus the correction value
  // that centres the error: returns the coefficients (real) and the error.
  // The scan stops early once the error reaches stop (the square will be
  // split and its coefficients are not needed).
  function automatic void fit_square(int fid, int n, int bxi, int byi, int s,
                                     output real cxy, output real cx, output real cy,
                                     output real c0, output real err,
                                     input real stop = 1.0e30);
    real u = 1.0 / real'(1 << n);
    real w = s * u;
    real bx = bxi * u, by = byi * u;
    real fbb = fval(fid, bx, by), feb = fval(fid, bx + w, by);
    real fbe = fval(fid, bx, by + w), fee = fval(fid, bx + w, by + w);
    real mx = -1.0e30, mn = 1.0e30;
    cxy = (fbb - feb - fbe + fee) / (w * w);
    cx  = (feb - fbb) / w;
    cy  = (fbe - fbb) / w;
    c0  = fbb;
    for (int i = 0; i < s; i++)
      for (int j = 0; j < s; j++) begin
        real dx = i * u, dy = j * u;
        real d;
        if ((open_x(fid) && bxi + i == 0) || (open_y(fid) && byi + j == 0)) continue;
        if (out_dom(fid, bx + dx, by + dy)) continue;
        d = fval(fid, bx + dx, by + dy) - (cxy * dx * dy + cx * dx + cy * dy + c0);
        if (d > mx) mx = d;
        if (d < mn) mn = d;
        if (mx - mn >= 2.0 * stop) begin err = (mx - mn) / 2.0; return; end  // will be split
      end
    if (mx < mn) begin mx = 0.0; mn = 0.0; end  // no point of the domain
    c0  = c0 + (mx + mn) / 2.0;
    err = (mx - mn) / 2.0;
  endfunction

  // Fixed-point coefficient: round(c * 2^cf).
  function automatic longint qcoef(real c, int cf);
    return longint'($floor(c * $pow(2.0, real'(cf)) + 0.5));
  endfunction

  // Exact bilinear polynomial, rounded and saturated like the hardware.
  function automatic longint ref_eval(longint cxy, longint cx, longint cy, longint c0,
                                      longint dx, longint dy, int m, int cf,
                                      int out_w, int out_f);
    longint s, r, hi, lo;
    int sh = cf + 2 * m - out_f;
    s = cxy * dx * dy + ((cx * dx) <<< m) + ((cy * dy) <<< m) + (c0 <<< (2 * m));
    r = (sh > 0) ? ((s + (longint'(1) <<< (sh - 1))) >>> sh) : s;
    hi = (longint'(1) <<< (out_w - 1)) - 1;
    lo = -(longint'(1) <<< (out_w - 1));
    if (r > hi) r = hi;
    if (r < lo) r = lo;
    return r;
  endfunction

  // Signed random value of w bits.
  function automatic longint srand(int w);
    longint v = longint'({$urandom, $urandom});
    v = v & ((longint'(1) <<< w) - 1);
    if (v >= (longint'(1) <<< (w - 1))) v = v - (longint'(1) <<< w);
    return v;
  endfunction

endpackage
