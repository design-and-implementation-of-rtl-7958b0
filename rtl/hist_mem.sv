// hist_mem: the block RAM that stores the histogram bins.
//
// A simple dual-port RAM: one write port and one read port with a registered
// (one-cycle) read. A read of the address being written in the same cycle
// returns the old contents; the histogram manager forwards around that case.
// All bins start at zero. Depth and word width are parameters; the defaults
// (4096 bins of 32 bits, 128 Kbit, four 36 Kbit block RAMs) are this design's
// choice, as no sizes are given for the histogram memory.
// Interface: clk; we/waddr/wdata; raddr -> rdata (1 cycle).
`timescale 1ps/1fs
module hist_mem #(
  parameter int DEPTH  = 4096,
  parameter int DATA_W = 32,
  parameter int ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
