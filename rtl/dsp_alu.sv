// dsp_alu: the final arithmetic, T = N * 2500 + T1 - T3, in two pipeline levels
// shaped for DSP slices.
//
// Level 1 scales the coarse count N by the clock period (2500 ps) and adds the
// start-line delay T1. Level 2 subtracts the stop-line delay T3. T1 is the time
// from the start edge to the next clock edge, N*2500 the whole periods from
// that edge to the first clock edge after the stop, and T3 the time from the
// stop edge to that clock edge, so the result is the start-to-stop interval
// in picoseconds.
//
// The two levels, the x2500 scaling and the 32-bit result follow the block
// diagram. The valid flag and the overflow flag carried alongside are this
// design's choice. The result is a two's-complement number (it can only be
// negative if the stop comes before the start in the same clock period).
// Interface: in_valid, n, t1_ps, t3_ps, n_overflow -> out_valid, out.
// Latency: 2 cycles; one new operation can enter every cycle.
`timescale 1ps/1fs
module dsp_alu #(
  parameter int CNT_W         = tdc_pkg::CNT_W,
  parameter int TIME_W        = tdc_pkg::TIME_W,
  parameter int CLK_PERIOD_PS = tdc_pkg::CLK_PERIOD_PS
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [CNT_W-1:0]  n,
  input  logic              n_overflow,
  input  logic [TIME_W-1:0] t1_ps,
  input  logic [TIME_W-1:0] t3_ps,
  output logic              out_valid,
  output tdc_pkg::meas_t    out
);
  // level 1
  logic              l1_valid, l1_ovf;
  logic [TIME_W-1:0] l1_sum, l1_t3;

  always_ff @(posedge clk) begin
    if (rst) begin
      l1_valid  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      l1_valid  <= in_valid;
      out_valid <= l1_valid;
    end
    l1_sum     <= TIME_W'(n) * TIME_W'(CLK_PERIOD_PS) + t1_ps;
    l1_t3      <= t3_ps;
    l1_ovf     <= n_overflow;
    // level 2
    out.t_ps     <= l1_sum - l1_t3;
    out.overflow <= l1_ovf;
  end
endmodule
