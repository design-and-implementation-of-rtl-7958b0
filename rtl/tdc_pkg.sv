// tdc_pkg: sizes and constants shared by the tapped-delay-line TDC.
//
// The delay line is 58 CARRY8 blocks of 8 taps each (464 sample points), the
// coarse counter runs at 400 MHz (2.5 ns period, 2500 ps per count) and is
// 16 bits wide, and every time value on the datapath is a 32-bit number of
// picoseconds. These numbers are the ones the design was built around; the
// widths derived from them (tap-count width, histogram sizes) are this
// implementation's choices.
`timescale 1ps/1fs
package tdc_pkg;
  localparam int TAPS_PER_BLOCK = 8;             // outputs of one CARRY8 block
  localparam int N_BLOCKS       = 58;            // CARRY8 blocks in one column
  localparam int N_TAPS         = TAPS_PER_BLOCK * N_BLOCKS;  // 464
  localparam int CLK_PERIOD_PS  = 2500;          // 400 MHz system clock
  localparam int CNT_W          = 16;            // coarse counter width
  localparam int TIME_W         = 32;            // picosecond datapath width

  // Tap permutation used by the reordering layer: entry k names the sampled
  // tap that becomes output bit k. Sized for the longest line supported.
  localparam int MAX_TAPS = 1024;
  typedef logic [MAX_TAPS-1:0][15:0] tap_order_t;

  // Identity order: output bit k is tap k.
  function automatic tap_order_t identity_order();
    tap_order_t o;
    for (int k = 0; k < MAX_TAPS; k++) o[k] = 16'(k);
    return o;
  endfunction

  // Number of bits needed to hold a ones-count of 0..n.
  function automatic int count_width(input int n);
    return $clog2(n + 1);
  endfunction

  // One finished measurement leaving the channel.
  typedef struct packed {
    logic              overflow;  // coarse counter saturated: T is not valid
    logic [TIME_W-1:0] t_ps;      // T = N*2500 + T1 - T3, in ps (two's complement)
  } meas_t;
endpackage
