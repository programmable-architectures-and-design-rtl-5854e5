// tb_seg_index_encoder: loads the LUT cascade with tables derived from a
// random quadtree segmentation and streams one random point per clock; every
// segment number must equal the one found by walking the tree, and must
// appear NCELL + 1 clocks after its input.  The tables are then reloaded
// with the symmetric numbering of a mirrored tree (mirror segments share a
// number, so the index function is no longer monotone) and the test repeats.
module tb_seg_index_encoder;
  import nfg2_tb_pkg::*;
  localparam int N = 8, SEG_W = 10, RAIL_W = 8, CELL_BITS = 2;
  localparam int NCELL = 2 * N / CELL_BITS;
  localparam int LAT = NCELL + 1;
  localparam int CELL_SW = $clog2(NCELL);
  localparam int LUT_AW = RAIL_W + CELL_BITS, LUT_DW = RAIL_W + SEG_W;

  logic clk = 0, rst_n = 0, in_valid = 0, seg_valid;
  logic [N-1:0] x = '0, y = '0;
  logic [SEG_W-1:0] seg;
  logic lut_we = 0;
  logic [CELL_SW-1:0] lut_cell = '0;
  logic [LUT_AW-1:0] lut_waddr = '0;
  logic [LUT_DW-1:0] lut_wdata = '0;
  int checks = 0, failures = 0, cycle = 0;
  int expq[$], tq[$];
  QuadSeg q;

  seg_index_encoder #(.N(N), .SEG_W(SEG_W), .RAIL_W(RAIL_W), .CELL_BITS(CELL_BITS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && seg_valid) begin
    automatic int e = expq.pop_front();
    automatic int t = tq.pop_front();
    checks++;
    if (int'(seg) != e || cycle - t != LAT) begin
      failures++;
      if (failures < 10) $display("seg %0d want %0d, latency %0d", seg, e, cycle - t);
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
  endtask

  task automatic stream(QuadSeg s, int count);
    for (int i = 0; i < count; i++) begin
      @(negedge clk);
      in_valid = 1;
      x = N'($urandom); y = N'($urandom);
      expq.push_back(s.seg_of(int'(x), int'(y)) % (1 << SEG_W));
      tq.push_back(cycle);
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // non-uniform tree, monotone numbering
    do begin
      q = new(N); q.grow(0, N, 45, 0); q.number(0);
    end while (q.nseg > (1 << SEG_W) || !q.rails_fit(CELL_BITS, RAIL_W) || q.nseg < 40);
    $display("tree 1: %0d segments, %0d rail values", q.nseg, q.max_rails());
    load_tables(q);
    stream(q, 3000);
    // symmetric tree, mirror segments share numbers
    do begin
      q = new(N); q.grow(0, N, 45, 1); q.mirror(0); q.number(1);
    end while (q.nseg > (1 << SEG_W) || !q.rails_fit(CELL_BITS, RAIL_W) || q.nseg < 40);
    $display("tree 2: %0d leaves, %0d numbers, %0d rail values", q.nleaves, q.nseg, q.max_rails());
    load_tables(q);
    stream(q, 3000);
    checks++;
    if (expq.size() != 0) begin failures++; $display("missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
