// delay_line: the sampling half of a tapped delay line.
//
// Every tap of the carry chain (the propagating start or stop edge) drives the
// D input of its own flip-flop, and all flip-flops are clocked by the 400 MHz
// system clock. At a rising clock edge the register therefore holds a
// thermometer code: the taps the edge has already passed read 1, the rest 0.
// The number of ones is the time from the signal edge to the clock edge in
// units of one tap delay (T1 for the start line, T3 for the stop line).
//
// With USE_REORDER = 1 a second register layer (tap_reorder) permutes the
// sample into the tap switching order measured on the device; that costs one
// more cycle. It defaults to 0 because the finished design counts the ones
// with a plain bit counter, which does not need the reordering.
// Interface: clk, taps (asynchronous carry-chain outputs), code (sampled
// taps). Latency: code is valid right after the sampling edge (1 register),
// or one cycle later with the reordering layer.
`timescale 1ps/1fs
module delay_line #(
  parameter int                  N_TAPS      = tdc_pkg::N_TAPS,
  parameter bit                  USE_REORDER = 1'b0,
  parameter tdc_pkg::tap_order_t ORDER       = tdc_pkg::identity_order()
) (
  input  logic              clk,
  input  logic [N_TAPS-1:0] taps,
  output logic [N_TAPS-1:0] code
);
  logic [N_TAPS-1:0] sample;

  always_ff @(posedge clk) sample <= taps;

  if (USE_REORDER) begin : g_reorder
    tap_reorder #(.N_TAPS(N_TAPS), .ORDER(ORDER)) u_reorder (
      .clk (clk),
      .d   (sample),
      .q   (code)
    );
  end else begin : g_direct
    assign code = sample;
  end
endmodule
