// bit_counter: counts the ones in a sampled delay-line code.
//
// The count of ones is the delay-line reading: how many taps the signal edge
// had passed at the sampling clock edge. A plain population count is used, so
// the result does not depend on the order in which the taps switch (bubbles in
// the thermometer code still count correctly). The sum is a wide adder tree
// that synthesis builds from the loop; it is registered once. A brute-force
// count of this kind is what the finished design uses (the reordering that
// would allow a faster staged decoder was left out); the single register
// stage, and so the 1-cycle latency, is this design's choice.
// Interface: clk, code (N_TAPS sampled taps), count (number of ones).
// Latency: 1 cycle.
`timescale 1ps/1fs
module bit_counter #(
  parameter int N_TAPS  = tdc_pkg::N_TAPS,
  parameter int COUNT_W = tdc_pkg::count_width(N_TAPS)
) (
  input  logic               clk,
  input  logic [N_TAPS-1:0]  code,
  output logic [COUNT_W-1:0] count
);
  logic [COUNT_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < N_TAPS; i++) sum = sum + COUNT_W'(code[i]);
  end

  always_ff @(posedge clk) count <= sum;
endmodule
