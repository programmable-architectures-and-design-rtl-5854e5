// tb_bilinear_eval: streams one random coefficient set and offset pair per
// clock into the evaluator and compares every result, three clocks later,
// with the exact polynomial rounded and saturated in 64-bit arithmetic.
// Some inputs use full-scale coefficients so that both saturation limits are
// reached; the tb counts them.
module tb_bilinear_eval;
  import nfg2_tb_pkg::*;
  localparam int DX_W = 12, M = 12, CW = 34, CF = 20, OUT_W = 16, OUT_F = 12;
  localparam int LAT = 3;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [DX_W-1:0] dx, dy;
  logic signed [CW-1:0] cxy, cx, cy, c0;
  logic signed [OUT_W-1:0] out;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0, cycle = 0;
  longint expq[$];
  int     tq[$];

  bilinear_eval #(.DX_W(DX_W), .M(M), .CW(CW), .CF(CF), .OUT_W(OUT_W), .OUT_F(OUT_F)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    automatic longint e = expq.pop_front();
    automatic int t = tq.pop_front();
    checks++;
    if (longint'(out) != e || cycle - t != LAT) begin
      failures++;
      $display("got %0d want %0d, latency %0d", out, e, cycle - t);
    end
    if (e == (1 << (OUT_W - 1)) - 1) sat_hi++;
    if (e == -(1 << (OUT_W - 1))) sat_lo++;
  end

  initial begin
    dx = '0; dy = '0; cxy = '0; cx = '0; cy = '0; c0 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      automatic int big = ($urandom_range(9) == 0);
      @(negedge clk);
      in_valid = ($urandom_range(5) != 0);
      dx = DX_W'($urandom); dy = DX_W'($urandom);
      cxy = CW'(srand(big ? CW : CF + 2)); cx = CW'(srand(big ? CW : CF + 2));
      cy  = CW'(srand(big ? CW : CF + 2)); c0 = CW'(srand(big ? CW : CF + 2));
      if (in_valid) begin
        expq.push_back(ref_eval(cxy, cx, cy, c0, dx, dy, M, CF, OUT_W, OUT_F));
        tq.push_back(cycle);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (expq.size() != 0 || sat_hi == 0 || sat_lo == 0) begin
      failures++;
      $display("left %0d results, saturations %0d/%0d", expq.size(), sat_hi, sat_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
