// nfg_ram: synchronous RAM used for the coefficients memory and for the LUT
// memories of the segment index encoder.
//
// The generators are programmable because every table they use is a RAM:
// loading different data switches the function without changing the
// circuit.  This RAM has one write port and one read port.  A write takes
// effect at the clock edge where we is high.  The read is synchronous, like
// the embedded block RAMs of an FPGA: rdata holds mem[raddr] one clock edge
// after raddr is presented.  Reading and writing the same word in the same
// cycle returns the old contents.  Contents are not reset; they must be
// written before they are read.
module nfg_ram #(
  parameter int unsigned DW = 8,   // word width
  parameter int unsigned AW = 4    // address width, 2^AW words
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
