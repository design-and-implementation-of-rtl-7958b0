// carry_chain: behavioural model of the carry-logic delay line (not synthesizable).
//
// On the FPGA the delay elements are the CARRY8 primitives of one CLB column:
// the input propagates through N_BLOCKS blocks of 8 taps each, and every tap
// output is wired to a flip-flop (see delay_line). A carry chain cannot be
// written as portable RTL -- it is placed and routed by the vendor tools -- so
// this file models its timing for simulation only.
//
// Tap i (0 = first) follows din after (i+1)*TAP_PS, plus BLOCK_EXTRA_PS for
// every block boundary already crossed (the hop from one carry block to the
// next is slower than a hop inside a block), plus LAST_TAP_SKEW_PS on the last
// tap of each block (that output also drives the next block, so its extra
// fanout delays it on the way to its flip-flop). With a large enough skew a
// later tap reaches its flip-flop before an earlier one, which produces the
// out-of-order ("bubble") codes that the reordering layer corrects.
//
// Default TAP_PS = 6.4 ps makes 464 taps span about 2.97 ns, matching the
// roughly 3 ns range measured for the 464-tap line. The skew parameters default
// to zero because no numbers for them are known. Delays use transport
// semantics (every edge of din reaches every tap). Ports: din (start or stop
// signal), taps (N_BLOCKS*8 delayed copies, tap 0 first).
`timescale 1ps/1fs
module carry_chain #(
  parameter int  N_BLOCKS         = tdc_pkg::N_BLOCKS,
  parameter real TAP_PS           = 6.4,
  parameter real BLOCK_EXTRA_PS   = 0.0,
  parameter real LAST_TAP_SKEW_PS = 0.0
) (
  input  logic                                     din,
  output logic [N_BLOCKS*tdc_pkg::TAPS_PER_BLOCK-1:0] taps
);
  localparam int N = N_BLOCKS * tdc_pkg::TAPS_PER_BLOCK;

  for (genvar i = 0; i < N; i++) begin : g_tap
    localparam real DELAY_PS = (i + 1) * TAP_PS
                             + (i / tdc_pkg::TAPS_PER_BLOCK) * BLOCK_EXTRA_PS
                             + (((i % tdc_pkg::TAPS_PER_BLOCK) == tdc_pkg::TAPS_PER_BLOCK - 1)
                                ? LAST_TAP_SKEW_PS : 0.0);
    logic t;
    initial t = 1'b0;
    always @(din) t <= #(DELAY_PS) din;
    assign taps[i] = t;
  end
endmodule
