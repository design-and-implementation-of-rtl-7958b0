// coarse_counter: the 400 MHz synchronous counter that measures the whole
// clock periods between the start and the stop signal.
//
// The start signal enables counting and the stop signal disables it. Both
// enter as levels already sampled by the clock (the first tap of each delay
// line), so the counter is fully synchronous: it is held at zero while start
// is low, counts one per cycle while start is high and stop is low, and
// freezes once stop is high. If start is first seen at clock edge Ea and stop
// at edge Eb, the counter reads Eb - Ea in the cycle after Eb; each count is
// one 2.5 ns period (T2 in T = T1 + T2 - T3).
//
// Enable/disable behaviour follows the design description; the width is 16
// bits as in the block diagram. Saturating at the top value with an overflow
// flag, instead of wrapping, is this design's choice so that an interval
// beyond the range (about 164 us) is never reported as a short one.
// Interface: clk, rst (synchronous, active high), start_lvl, stop_lvl,
// count, overflow.
`timescale 1ps/1fs
module coarse_counter #(
  parameter int CNT_W = tdc_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start_lvl,
  input  logic             stop_lvl,
  output logic [CNT_W-1:0] count,
  output logic             overflow
);
  always_ff @(posedge clk) begin
    if (rst || !start_lvl) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (!stop_lvl) begin
      if (count == '1) overflow <= 1'b1;
      else             count    <= count + 1'b1;
    end
  end
endmodule
