// tb_sym_swap: checks the comparator and multiplexers: the outputs are
// (min, max) of the inputs and swapped is set exactly when X > Y, including
// the diagonal X = Y and the extreme values.
module tb_sym_swap;
  localparam int N = 12;
  logic [N-1:0] x, y, xs, ys;
  logic swapped;
  int checks = 0, failures = 0;

  sym_swap #(.N(N)) dut (.*);

  task automatic check(int a, int b);
    x = N'(a); y = N'(b);
    #1;
    checks++;
    if (xs !== N'((a < b) ? a : b) || ys !== N'((a < b) ? b : a) || swapped !== (a > b)) begin
      failures++;
      $display("x=%0d y=%0d: xs=%0d ys=%0d swapped=%0d", a, b, xs, ys, swapped);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0); check((1 << N) - 1, 0); check(0, (1 << N) - 1);
    check((1 << N) - 1, (1 << N) - 1); check(5, 4); check(4, 5);
    for (int i = 0; i < 5000; i++) begin
      automatic int a = $urandom_range((1 << N) - 1);
      automatic int b = ($urandom_range(7) == 0) ? a : $urandom_range((1 << N) - 1);
      check(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
