// tap_reorder: flip-flop layer that puts the sampled delay-line taps into the
// order in which they actually switch.
//
// Placement and routing make some taps reach their sampling flip-flop before
// taps that sit earlier in the carry chain, so the raw sample is not a clean
// thermometer code. The switching order is measured once on the board (by
// repeating a delay sweep and sorting the taps by when they turn on) and then
// fixed in hardware: this module is one register per tap whose D input is the
// tap named by ORDER. Output bit k is sampled tap ORDER[k], one clock later.
//
// The measured-order approach and the extra register layer follow the design
// description; passing the order as a parameter (identity by default, since
// the order belongs to one placed-and-routed device) is this design's choice.
// Interface: clk, d (sampled taps), q (reordered taps). Latency: 1 cycle.
`timescale 1ps/1fs
module tap_reorder #(
  parameter int                  N_TAPS = tdc_pkg::N_TAPS,
  parameter tdc_pkg::tap_order_t ORDER  = tdc_pkg::identity_order()
) (
  input  logic              clk,
  input  logic [N_TAPS-1:0] d,
  output logic [N_TAPS-1:0] q
);
  localparam int IDX_W = (N_TAPS > 1) ? $clog2(N_TAPS) : 1;

  initial begin
    assert (N_TAPS <= tdc_pkg::MAX_TAPS) else $fatal(1, "N_TAPS above MAX_TAPS");
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < N_TAPS; k++) q[k] <= d[ORDER[k][IDX_W-1:0]];
  end
endmodule
