// tb_nfg2_uniform: loads every word of the uniform NFG's coefficients memory
// (default size: 12-bit inputs, 128 x 128 segments) with random coefficients
// and streams random points, one per clock.  Each result is compared with the
// polynomial of the square that holds the point, evaluated exactly at the
// offset from the square's corner, and must arrive 4 clocks after its input.
module tb_nfg2_uniform;
  import nfg2_tb_pkg::*;
  localparam int N = 12, UB = 7, CW = 34, CF = 20, OUT_W = 16, OUT_F = 12;
  localparam int LAT = 4;
  localparam int AW = 2 * UB, SIDE = 1 << (N - UB);

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [N-1:0] x = '0, y = '0;
  logic signed [OUT_W-1:0] out;
  logic coef_we = 0;
  logic [AW-1:0] coef_waddr = '0;
  logic [4*CW-1:0] coef_wdata = '0;
  int checks = 0, failures = 0, cycle = 0;
  longint expq[$];
  int tq[$];
  longint cxy[1 << AW], cx[1 << AW], cy[1 << AW], c0[1 << AW];

  nfg2_uniform dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
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

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < (1 << AW); a++) begin
      cxy[a] = srand(CF + 2); cx[a] = srand(CF + 1); cy[a] = srand(CF + 1); c0[a] = srand(CF + 2);
      @(negedge clk);
      coef_we = 1; coef_waddr = AW'(a);
      coef_wdata = {CW'(cxy[a]), CW'(cx[a]), CW'(cy[a]), CW'(c0[a])};
    end
    @(negedge clk); coef_we = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(7) != 0);
      x = N'($urandom); y = N'($urandom);
      if (in_valid) begin
        // square (i, j) has corner (i*SIDE, j*SIDE) and word i * 2^UB + j
        automatic int si = int'(x) / SIDE, sj = int'(y) / SIDE;
        automatic int a = si * (1 << UB) + sj;
        expq.push_back(ref_eval(cxy[a], cx[a], cy[a], c0[a], int'(x) - si * SIDE,
                                int'(y) - sj * SIDE, N, CF, OUT_W, OUT_F));
        tq.push_back(cycle);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
