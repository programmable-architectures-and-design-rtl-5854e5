// tb_nfg_ram: checks the synchronous RAM against a model array: data written
// to random addresses reads back one clock after the address is presented,
// and a read of the word being written returns the old contents.
module tb_nfg_ram;
  localparam int DW = 16, AW = 6;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  nfg_ram #(.DW(DW), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk); we = 1; waddr = AW'(a); wdata = DW'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    // read all back: rdata valid after the next edge
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk); raddr = AW'(a);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin
        failures++; $display("read %0d: got %h want %h", a, rdata, model[a]);
      end
    end
    // random mix, including read of the word written in the same cycle
    for (int i = 0; i < 2000; i++) begin
      automatic logic [DW-1:0] expect_q;
      @(negedge clk);
      we = 1'($urandom); waddr = AW'($urandom); wdata = DW'($urandom);
      raddr = ($urandom_range(3) == 0) ? waddr : AW'($urandom);
      expect_q = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      @(negedge clk);
      we = 0;
      checks++;
      if (rdata !== expect_q) begin
        failures++; $display("mix %0d: got %h want %h", i, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
