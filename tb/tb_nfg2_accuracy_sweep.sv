// tb_nfg2_accuracy_sweep: XY/sqrt(X^2+Y^2) on (0,1)^2 at 4, 6, 8, 10, 12 and
// 14 bits of accuracy (acceptable approximation error 2^-(N+2)), to show how
// the segment counts and memory grow with accuracy for the uniform, the
// recursive and the symmetric generator.  One nfg2_wl_runner per accuracy,
// run one after the other; each segments the function, prints the counts
// and the memory of a generator fitted to it, loads its own instance and
// checks random inputs against the real function (approximation error
// plus 2^-13 output rounding plus 2^-18 coefficient rounding).  The 8- and
// 12-bit counts are also held against the published ones.  The uniform
// memory grows about fourfold per accuracy bit, like a plain table of all
// inputs; the recursive and symmetric ones grow about twofold.
module tb_nfg2_accuracy_sweep;
  // 16 bits would take several minutes of segmentation alone.
  localparam int NACC = 6;
  localparam int ACC [NACC] = '{4, 6, 8, 10, 12, 14};
  localparam int PREC [NACC] = '{0, 0, 256, 0, 4114, 0};
  localparam int PSYM [NACC] = '{0, 0, 139, 0, 2104, 0};

  logic clk = 0;
  logic [NACC-1:0] start = '0, done;
  int c [NACC];
  int f [NACC];
  int checks, failures;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NACC; i++) begin : g_acc
    nfg2_wl_runner #(
      .N(ACC[i]), .SEGW(ACC[i] + 1), .FID(4), .SYM(1'b1), .P_REC(PREC[i]), .P_SYM(PSYM[i]),
      .EPS(1.0 / real'(1 << (ACC[i] + 2))),
      .BOUND(1.0 / real'(1 << (ACC[i] + 2)) + 1.0 / 8192.0 + 1.0 / 262144.0),
      .NPTS(20000)
    ) u_run (.clk(clk), .start(start[i]), .done(done[i]), .checks(c[i]), .failures(f[i]));
  end

  function automatic void total();
    checks = 0; failures = 0;
    for (int i = 0; i < NACC; i++) begin checks += c[i]; failures += f[i]; end
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    total();
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < NACC; i++) begin
      start[i] = 1;
      wait (done[i]);
    end
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
