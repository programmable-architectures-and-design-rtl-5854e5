// tb_nfg2_workload_large: the two evaluated functions on (0,1)^2 whose
// 12-bit recursive segmentations (acceptable approximation error 2^-14)
// need more than the default 16,384 coefficient words.  Each runs on its
// own instance, widened through its parameters; see nfg2_wl_runner for
// what is checked.
//
//   sin(pi X) sqrt(Y): about 41,000 segments, so 16-bit segment numbers
//   and rails (65,536 words); default coefficient and output formats.  Not
//   symmetric, so only the recursive generator is loaded.
//
//   1/sqrt(X^2 + Y^2): values up to about 2,900 near the origin, bilinear
//   coefficients up to about 5e10 and about 157,000 segments.  18-bit
//   segment numbers and rails (262,144 words), 57-bit coefficients (20
//   fractional bits) and a 26-bit output (12 fractional bits); recursive
//   and symmetric generators.
//
// 1/sqrt(X^2 + Y^2) also runs at 8-bit accuracy (N = 8, approximation
// error 2^-10, 4,096 words, 57-bit coefficients, 22-bit output).
//
// Both functions have a singular derivative at the domain's edge (at Y = 0
// and at the origin).  There the segment count depends on exactly which
// points the error test visits, and the counts come out 1.4 to 1.6 times
// the published ones.  So they are held only to within 60 %; the accuracy
// of every checked result is held as usual.
module tb_nfg2_workload_large;
  logic clk = 0;
  logic start_a = 0, start_b = 0, start_c = 0;
  logic done_a, done_b, done_c;
  int checks_a, failures_a, checks_b, failures_b, checks_c, failures_c;
  int checks, failures;

  always #5 clk = ~clk;

  nfg2_wl_runner #(.N(12), .SEGW(16), .FID(0), .SYM(1'b0), .P_REC(29875), .TOL(0.6))
    u_sinsqrt (.clk(clk), .start(start_a), .done(done_a), .checks(checks_a), .failures(failures_a));

  nfg2_wl_runner #(.N(12), .SEGW(18), .FID(3), .SYM(1'b1), .P_REC(103046), .P_SYM(51687),
                   .CW(57), .OW(26), .TOL(0.6))
    u_recip (.clk(clk), .start(start_b), .done(done_b), .checks(checks_b), .failures(failures_b));

  nfg2_wl_runner #(.N(8), .SEGW(12), .FID(3), .SYM(1'b1), .P_REC(2344), .P_SYM(1195),
                   .CW(57), .OW(22), .TOL(0.6), .EPS(1.0 / 1024.0), .BOUND(1.0 / 1024.0 + 1.0 / 8192.0 + 1.0 / 262144.0), .NPTS(20000))
    u_recip8 (.clk(clk), .start(start_c), .done(done_c), .checks(checks_c), .failures(failures_c));

  initial begin
    repeat (4000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b + checks_c,
             failures_a + failures_b + failures_c + 1);
    $finish;
  end

  initial begin
    start_a = 1;
    wait (done_a);
    start_b = 1;
    wait (done_b);
    start_c = 1;
    wait (done_c);
    checks = checks_a + checks_b + checks_c;
    failures = failures_a + failures_b + failures_c;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
