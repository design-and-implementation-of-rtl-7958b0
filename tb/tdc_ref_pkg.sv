// tdc_ref_pkg: reference model of an ideal tapped-delay-line TDC, used by the
// channel and top-level testbenches to work out the expected result of a
// measurement independently of the RTL.
//
// Clock rising edges are at EDGE0_PS + k * PERIOD_PS. Tap 0 of a line follows
// its input after one tap delay, and a line reads floor(dt / tap) ones when its
// input rose dt before a clock edge. A signal is first seen at the first edge
// more than one tap delay after it rises. The encoder maps a count c to
// round(c * tap) ps.
`timescale 1ps/1fs
package tdc_ref_pkg;
  localparam real EDGE0_PS  = 1250.0;
  localparam real PERIOD_PS = 2500.0;

  typedef struct {
    longint edge_idx;    // index of the first clock edge that sees the signal
    int     ones;     // ones in the sample taken at that edge
  } line_read_t;

  function automatic line_read_t read_line(input real t_rise, input real tap_ps, input int n_taps);
    line_read_t r;
    real dt;
    r.edge_idx = longint'($ceil((t_rise + tap_ps - EDGE0_PS) / PERIOD_PS));
    dt = EDGE0_PS + r.edge_idx * PERIOD_PS - t_rise;
    if (dt <= tap_ps) begin r.edge_idx++; dt += PERIOD_PS; end
    r.ones = (dt / tap_ps >= n_taps) ? n_taps : int'($floor(dt / tap_ps));
    return r;
  endfunction

  function automatic longint enc(input int ones, input int tap_fs);
    return (longint'(ones) * tap_fs + 500) / 1000;
  endfunction

  function automatic real edge_time(input longint k);
    return EDGE0_PS + k * PERIOD_PS;
  endfunction
endpackage
