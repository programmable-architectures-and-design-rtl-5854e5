// tb_offset_and: for random square segments of side 2^h whose corner has its
// low h bits at zero, and random points inside them, checks that the AND
// gates give exactly X - Bx and Y - By.
module tb_offset_and;
  localparam int N = 12;
  logic [N-1:0] x, y, bx, by, dx, dy;
  int checks = 0, failures = 0;

  offset_and #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      automatic int h = $urandom_range(N);
      automatic int side = 1 << h;
      automatic int cx = ($urandom_range((1 << N) - 1) / side) * side;
      automatic int cy = ($urandom_range((1 << N) - 1) / side) * side;
      automatic int ox = $urandom_range(side - 1);
      automatic int oy = $urandom_range(side - 1);
      bx = N'(cx); by = N'(cy); x = N'(cx + ox); y = N'(cy + oy);
      #1;
      checks++;
      if (dx !== N'(ox) || dy !== N'(oy)) begin
        failures++;
        $display("h=%0d x=%0d bx=%0d: dx=%0d want %0d, dy=%0d want %0d",
                 h, x, bx, dx, ox, dy, oy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
