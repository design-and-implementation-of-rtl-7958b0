// tdc_channel_tb: one channel fed by two 464-tap carry-chain models.
// Start/stop pairs with random phase against the 400 MHz clock and intervals
// from a few ps (start and stop in the same clock period) to microseconds are
// measured. Each result must equal N*2500 + T1 - T3 as worked out by the
// reference model, lie within one tap of the true interval, and appear
// exactly 4 cycles after the clock edge that first sees the stop. A stop that
// rises n_before its start and a start that drops without a stop must produce
// no result. Finally an encoder entry is recalibrated and the next result must
// move by the change.
`timescale 1ps/1fs
module tdc_channel_tb;
  import tdc_ref_pkg::*;
  localparam int  N_TAPS = 464;
  localparam int  TAP_FS = 6400;
  localparam real TAP    = 6.4;

  int checks = 0, failures = 0;
  int n_same_period = 0, n_multi_period = 0, n_ignored = 0, n_calibrated = 0;

  logic clk = 1'b0;
  initial forever #1250.0 clk = ~clk;

  logic rst, start, stop, cal_we, cal_line, meas_valid;
  logic [8:0]  cal_addr;
  logic [31:0] cal_data;
  logic [N_TAPS-1:0] start_taps, stop_taps;
  tdc_pkg::meas_t meas;

  carry_chain u_cs (.din(start), .taps(start_taps));
  carry_chain u_cp (.din(stop),  .taps(stop_taps));
  tdc_channel dut (.clk, .rst, .start_taps, .stop_taps, .cal_we, .cal_line, .cal_addr,
                   .cal_data, .meas_valid, .meas);

  int valid_seen = 0;
  always @(negedge clk) if (meas_valid) valid_seen++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic release_lines();
    @(negedge clk);
    start = 1'b0; stop = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  // One start/stop pair; t_start is absolute, t_int is the interval.
  task automatic measure(input real t_start, input real t_int, input longint t1_adj = 0);
    line_read_t rs, rp;
    longint     exp_t;
    real        t_valid;
    int         n_before = valid_seen;
    rs = read_line(t_start, TAP, N_TAPS);
    rp = read_line(t_start + t_int, TAP, N_TAPS);
    exp_t = (rp.edge_idx - rs.edge_idx) * 2500 + enc(rs.ones, TAP_FS) + t1_adj - enc(rp.ones, TAP_FS);
    #(t_start - $realtime);
    start = 1'b1;
    #(t_int);
    stop = 1'b1;
    do @(negedge clk); while (!meas_valid && $realtime < t_start + t_int + 20000.0);
    t_valid = $realtime;
    check(meas_valid, $sformatf("result for T=%0.2f", t_int));
    check(longint'($signed(meas.t_ps)) == exp_t && !meas.overflow,
          $sformatf("T=%0.2f got %0d expected %0d", t_int, $signed(meas.t_ps), exp_t));
    check(t1_adj != 0 || ($signed(meas.t_ps) - t_int < TAP + 1.0 && t_int - $signed(meas.t_ps) < TAP + 1.0),
          $sformatf("T=%0.2f error too large (%0d)", t_int, $signed(meas.t_ps)));
    // latency: valid after the 4th edge following the stop-sampling edge
    check(t_valid == edge_time(rp.edge_idx + 4) + 1250.0,
          $sformatf("latency: valid at %0.1f, edge Eb at %0.1f", t_valid, edge_time(rp.edge_idx)));
    if (rp.edge_idx == rs.edge_idx) n_same_period++; else n_multi_period++;
    release_lines();
    check(valid_seen == n_before + 1, "exactly one result");
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; stop = 1'b0; cal_we = 1'b0; cal_line = 1'b0; cal_addr = '0; cal_data = '0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (2) @(negedge clk);
    // short intervals, start and stop often in the same period
    for (int k = 0; k < 40; k++)
      measure($realtime + 3000.0 + ($urandom % 2500) + 0.37, 10.0 + ($urandom % 2400) + 0.21);
    // random intervals up to 1 us
    for (int k = 0; k < 30; k++)
      measure($realtime + 3000.0 + ($urandom % 2500) + 0.53, 2500.0 + ($urandom % 1000000) + 0.77);
    // the two intervals of the final test campaign
    measure($realtime + 3100.13, 500600.0);
    measure($realtime + 4200.71, 2001600.0);

    // stop n_before start: ignored
    begin
      int n_before;
      n_before = valid_seen;
      @(negedge clk); #300.0; stop = 1'b1;
      repeat (3) @(negedge clk); #200.0; start = 1'b1;
      repeat (12) @(negedge clk);
      check(valid_seen == n_before, "stop n_before start gives no result");
      release_lines();
      // start pulse without stop: ignored, channel re-arms
      #300.0; start = 1'b1;
      repeat (5) @(negedge clk);
      start = 1'b0;
      repeat (12) @(negedge clk);
      check(valid_seen == n_before, "aborted start gives no result");
      n_ignored += 2;
    end
    measure($realtime + 3000.29, 12345.6);

    // recalibrate: add 100 ps to every start-line entry
    for (int i = 0; i <= N_TAPS; i++) begin
      @(negedge clk);
      cal_we = 1'b1; cal_line = 1'b0; cal_addr = 9'(i); cal_data = 32'(enc(i, TAP_FS) + 100);
    end
    @(negedge clk);
    cal_we = 1'b0;
    measure($realtime + 3000.41, 7777.7, 100);
    n_calibrated++;

    check(n_same_period > 0 && n_multi_period > 0 && n_ignored > 0 && n_calibrated > 0,
          "every case exercised");
    $display("same-period %0d, multi-period %0d, ignored %0d", n_same_period, n_multi_period, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
