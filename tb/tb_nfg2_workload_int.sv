// tb_nfg2_workload_int: the two evaluated functions whose domains need
// integer input bits, at 12-bit accuracy (12 fractional input bits,
// acceptable approximation error 2^-14).
//   WaveRings  cos(r) / sqrt(r^2 + 0.25), r = sqrt(X^2 + Y^2), on [0,pi]^2:
//              2 integer bits, N = 14.
//   Sombrero   sin(r) / r on (0,8)^2: 3 integer bits, N = 15.
// Both are symmetric.  Both also run at 8-bit accuracy (8 fractional
// input bits, N = 10 and 11, approximation error 2^-10).  Each runs on its own generator instance (one
// nfg2_wl_runner each) with a 32,768-word coefficients memory, since the
// recursive segmentations need slightly more than 16,384 words.  The
// runners segment, load and check one after the other; see nfg2_wl_runner
// for what is checked.  Unit inputs are scaled inside the function model,
// so the hardware sees ordinary N-bit codes.
module tb_nfg2_workload_int;
  logic clk = 0;
  logic start_a = 0, start_b = 0, start_c = 0, start_d = 0;
  logic done_a, done_b, done_c, done_d;
  int checks_a, failures_a, checks_b, failures_b, checks_c, failures_c, checks_d, failures_d;
  int checks, failures;

  always #5 clk = ~clk;

  nfg2_wl_runner #(.N(14), .SEGW(15), .FID(5), .SYM(1'b1), .P_REC(16278), .P_SYM(8202))
    u_rings (.clk(clk), .start(start_a), .done(done_a), .checks(checks_a), .failures(failures_a));

  nfg2_wl_runner #(.N(15), .SEGW(15), .FID(6), .SYM(1'b1), .P_REC(18664), .P_SYM(9398))
    u_sombrero (.clk(clk), .start(start_b), .done(done_b), .checks(checks_b), .failures(failures_b));

  nfg2_wl_runner #(.N(10), .SEGW(11), .FID(5), .SYM(1'b1), .P_REC(949), .P_SYM(490),
                   .EPS(1.0 / 1024.0), .BOUND(1.0 / 1024.0 + 1.0 / 8192.0 + 1.0 / 262144.0), .NPTS(20000))
    u_rings8 (.clk(clk), .start(start_c), .done(done_c), .checks(checks_c), .failures(failures_c));

  nfg2_wl_runner #(.N(11), .SEGW(11), .FID(6), .SYM(1'b1), .P_REC(1180), .P_SYM(607),
                   .EPS(1.0 / 1024.0), .BOUND(1.0 / 1024.0 + 1.0 / 8192.0 + 1.0 / 262144.0), .NPTS(20000))
    u_sombrero8 (.clk(clk), .start(start_d), .done(done_d), .checks(checks_d), .failures(failures_d));

  initial begin
    repeat (4000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b + checks_c + checks_d,
             failures_a + failures_b + failures_c + failures_d + 1);
    $finish;
  end

  initial begin
    start_a = 1;
    wait (done_a);
    start_b = 1;
    wait (done_b);
    start_c = 1;
    wait (done_c);
    start_d = 1;
    wait (done_d);
    checks = checks_a + checks_b + checks_c + checks_d;
    failures = failures_a + failures_b + failures_c + failures_d;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
