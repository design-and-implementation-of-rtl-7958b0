// tdc_top_tb: end-to-end test of the complete TDC at its default size
// (2 x 464-tap carry chains, 16-bit 400 MHz coarse counter, 4096-bin
// histogram).
//
// A run of start/stop pairs with random clock phase is measured: intervals
// inside one clock period, intervals of many periods, the 500.6 ns and
// 2001.6 ns intervals of the final test campaign, one beyond the coarse
// counter's range (170 us, must come out flagged as overflow), a stop that
// rises before its start (must be ignored), and intervals that fall below and
// above the histogram window. Every streamed result is compared with the
// reference model (N*2500 + T1 - T3) and must be within one tap of the true
// interval. The histogram is then read back bin by bin and compared with the
// model, as are the total/under/over counters. An encoder entry is
// recalibrated and checked, and a clear must empty the histogram. Each of
// these mechanisms is counted, and one that never happened is a failure.
`timescale 1ps/1fs
module tdc_top_tb;
  import tdc_ref_pkg::*;
  localparam int  N_TAPS = 464;
  localparam int  TAP_FS = 6400;
  localparam real TAP    = 6.4;
  localparam int  NB     = 4096;
  localparam int  MIN_PS = 1000;
  localparam int  SHIFT  = 5;

  int checks = 0, failures = 0;
  int n_same = 0, n_multi = 0, n_ovf = 0, n_under = 0, n_over = 0, n_in = 0;
  int n_ignored = 0, n_cal = 0, n_clear = 0, n_read = 0;

  logic clk = 1'b0;
  initial forever #1250.0 clk = ~clk;

  logic        rst, start, stop, cal_we, cal_line, meas_valid;
  logic [8:0]  cal_addr;
  logic [31:0] cal_data, cfg_min_ps, total_cnt, under_cnt, over_cnt, rd_data;
  logic [4:0]  cfg_bin_shift;
  logic        acq_en, clear, clear_busy, rd_en, rd_valid;
  logic [11:0] rd_addr;
  tdc_pkg::meas_t meas;

  tdc_top dut (.*);

  int model [NB];
  int m_total = 0, m_under = 0, m_over = 0;
  int valid_seen = 0;
  always @(negedge clk) if (meas_valid) valid_seen++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic account(input longint t, input bit ovf);
    longint d = t - MIN_PS;
    m_total++;
    if (d < 0) begin m_under++; n_under++; end
    else if (ovf || (d >> SHIFT) >= NB) begin m_over++; n_over++; end
    else begin model[d >> SHIFT]++; n_in++; end
  endtask

  task automatic measure(input real t_start, input real t_int, input longint adj = 0);
    line_read_t rs, rp;
    longint     exp_t;
    bit         exp_ovf;
    int         n_before;
    n_before = valid_seen;
    rs = read_line(t_start, TAP, N_TAPS);
    rp = read_line(t_start + t_int, TAP, N_TAPS);
    exp_ovf = (rp.edge_idx - rs.edge_idx) > 65535;
    exp_t = (exp_ovf ? 65535 : (rp.edge_idx - rs.edge_idx)) * 2500
          + enc(rs.ones, TAP_FS) - enc(rp.ones, TAP_FS) + adj;
    #(t_start - $realtime);
    start = 1'b1;
    #(t_int);
    stop = 1'b1;
    do @(negedge clk); while (!meas_valid && $realtime < t_start + t_int + 20000.0);
    check(meas_valid && meas.overflow == exp_ovf, $sformatf("result for T=%0.2f", t_int));
    check(longint'($signed(meas.t_ps)) == exp_t,
          $sformatf("T=%0.2f got %0d expected %0d", t_int, $signed(meas.t_ps), exp_t));
    if (!exp_ovf && adj == 0)
      check($signed(meas.t_ps) - t_int < TAP + 1.0 && t_int - $signed(meas.t_ps) < TAP + 1.0,
            $sformatf("T=%0.2f error too large", t_int));
    check(meas_valid && $realtime == edge_time(rp.edge_idx + 4) + 1250.0, "latency 4 cycles");
    account(exp_t, exp_ovf);
    if (exp_ovf) n_ovf++;
    else if (rp.edge_idx == rs.edge_idx) n_same++;
    else n_multi++;
    @(negedge clk);
    start = 1'b0; stop = 1'b0;
    repeat (4) @(negedge clk);
    check(valid_seen == n_before + 1, "exactly one result");
  endtask

  task automatic read_histogram(input string tag);
    int bad = 0;
    @(negedge clk);
    acq_en = 1'b0;
    for (int b = 0; b < NB; b++) begin
      rd_en = 1'b1; rd_addr = 12'(b);
      @(negedge clk);
      if (!rd_valid || rd_data != 32'(model[b])) begin
        bad++;
        if (bad < 5) $display("FAIL %s bin %0d: %0d expected %0d", tag, b, rd_data, model[b]);
      end
    end
    rd_en = 1'b0;
    checks++;
    if (bad != 0) failures++;
    check(total_cnt == 32'(m_total) && under_cnt == 32'(m_under) && over_cnt == 32'(m_over),
          $sformatf("%s counters %0d/%0d/%0d expected %0d/%0d/%0d", tag, total_cnt,
                    under_cnt, over_cnt, m_total, m_under, m_over));
    n_read++;
    acq_en = 1'b1;
  endtask

  task automatic do_clear();
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    while (clear_busy) @(negedge clk);
    for (int b = 0; b < NB; b++) model[b] = 0;
    m_total = 0; m_under = 0; m_over = 0;
    n_clear++;
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; stop = 1'b0;
    cal_we = 1'b0; cal_line = 1'b0; cal_addr = '0; cal_data = '0;
    cfg_min_ps = 32'(MIN_PS); cfg_bin_shift = 5'(SHIFT);
    acq_en = 1'b0; clear = 1'b0; rd_en = 1'b0; rd_addr = '0;
    for (int b = 0; b < NB; b++) model[b] = 0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    do_clear();
    acq_en = 1'b1;

    // intervals within one period and a few periods (some below the window)
    for (int k = 0; k < 60; k++)
      measure($realtime + 3000.0 + ($urandom % 2500) + 0.37, 5.0 + ($urandom % 6000) + 0.21);
    // intervals up to 120 ns, inside the window, several into the same bins
    for (int k = 0; k < 60; k++)
      measure($realtime + 3000.0 + ($urandom % 2500) + 0.53,
              (k % 3 == 0) ? 50000.3 : 1000.0 + ($urandom % 120000) + 0.77);
    // the final-test intervals (above the window) and one beyond the counter
    measure($realtime + 3100.13, 500600.0);
    measure($realtime + 4200.71, 2001600.0);
    measure($realtime + 3300.29, 170000000.0);

    // stop before start: ignored
    @(negedge clk); #300.0; stop = 1'b1;
    repeat (3) @(negedge clk); #200.0; start = 1'b1;
    repeat (12) @(negedge clk);
    check(valid_seen == m_total, "stop before start ignored");
    n_ignored++;
    @(negedge clk); start = 1'b0; stop = 1'b0;
    repeat (4) @(negedge clk);

    read_histogram("run");

    // recalibrate the stop line: every entry 30 ps larger
    for (int i = 0; i <= N_TAPS; i++) begin
      @(negedge clk);
      cal_we = 1'b1; cal_line = 1'b1; cal_addr = 9'(i); cal_data = 32'(enc(i, TAP_FS) + 30);
    end
    @(negedge clk);
    cal_we = 1'b0;
    measure($realtime + 3000.41, 20000.7, -30);
    n_cal++;
    read_histogram("calibrated");

    do_clear();
    read_histogram("cleared");

    check(n_same > 0 && n_multi > 0 && n_ovf > 0 && n_under > 0 && n_over > 0 && n_in > 0 &&
          n_ignored > 0 && n_cal > 0 && n_clear > 0 && n_read > 0, "every mechanism exercised");
    $display("same-period %0d, multi-period %0d, coarse overflow %0d, under %0d, over %0d, in %0d",
             n_same, n_multi, n_ovf, n_under, n_over, n_in);
    $display("ignored %0d, calibrations %0d, clears %0d, readouts %0d", n_ignored, n_cal, n_clear, n_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
