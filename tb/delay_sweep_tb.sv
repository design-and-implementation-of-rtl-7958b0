// delay_sweep_tb: delay-line sweep with out-of-order taps, without and with the
// reordering layer.
//
// The start edge is placed d ps before a clock edge, for d from 3.3 ps to
// 3.2 ns in 10 ps steps, and the 464-tap line is sampled at that edge. The
// carry-chain model is given a 2 ps penalty per block boundary and a 15 ps
// extra delay on the last tap of every block, so that tap reaches its
// flip-flop after the first taps of the next block: the plain samples show
// bubbles. The reordering layer gets the order implied by those delays
// (worked out here from the same delay formula). For every step:
//  * the reordered code must be a clean thermometer code,
//  * both codes must hold as many ones as there are taps with delay < d,
//    and the bit counter must give that number for either code,
//  * the count must never decrease as d grows, and beyond the line length
//    every tap must read 1.
// The tap order is also measured from the sweep (first step at which each tap
// reads 1) and must agree with the order given to the reordering layer.
`timescale 1ps/1fs
module delay_sweep_tb;
  localparam int  N       = 464;
  localparam real TAP     = 6.4;
  localparam real BLK     = 2.0;
  localparam real SKEW    = 15.0;
  localparam int  STEPS   = 320;

  int checks = 0, failures = 0;
  int n_bubbles = 0, n_full = 0;

  logic clk = 1'b0;
  initial forever #1250.0 clk = ~clk;

  function automatic real tap_delay(input int i);
    return (i + 1) * TAP + (i / 8) * BLK + ((i % 8 == 7) ? SKEW : 0.0);
  endfunction

  // taps sorted by arrival time (stable for equal delays)
  function automatic tdc_pkg::tap_order_t sorted_order();
    tdc_pkg::tap_order_t o = tdc_pkg::identity_order();
    for (int a = 1; a < N; a++) begin
      logic [15:0] key = o[a];
      int b = a - 1;
      while (b >= 0 && tap_delay(int'(o[b])) > tap_delay(int'(key))) begin
        o[b + 1] = o[b];
        b--;
      end
      o[b + 1] = key;
    end
    return o;
  endfunction
  localparam tdc_pkg::tap_order_t ORD = sorted_order();

  logic start = 1'b0;
  logic [N-1:0] taps, code_plain, code_re;
  logic [8:0]   cnt_plain, cnt_re;

  carry_chain #(.TAP_PS(TAP), .BLOCK_EXTRA_PS(BLK), .LAST_TAP_SKEW_PS(SKEW)) u_chain
    (.din(start), .taps(taps));
  delay_line #(.N_TAPS(N)) u_plain (.clk(clk), .taps(taps), .code(code_plain));
  delay_line #(.N_TAPS(N), .USE_REORDER(1'b1), .ORDER(ORD)) u_re (.clk(clk), .taps(taps), .code(code_re));
  bit_counter #(.N_TAPS(N)) u_bc_plain (.clk(clk), .code(code_plain), .count(cnt_plain));
  bit_counter #(.N_TAPS(N)) u_bc_re    (.clk(clk), .code(code_re),    .count(cnt_re));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  int first_on [N];
  int prev_count = 0;

  initial begin
    for (int i = 0; i < N; i++) first_on[i] = -1;
    repeat (4) @(negedge clk);
    for (int s = 0; s < STEPS; s++) begin
      real d, t_edge;
      int  expected;
      logic [N-1:0] sample;
      d = 3.3 + 10.0 * s;
      expected = 0;
      for (int i = 0; i < N; i++) if (tap_delay(i) < d) expected++;
      // the clock edge three periods ahead; start rises d before it
      t_edge = $realtime + 1250.0 + 2 * 2500.0;
      #(t_edge - d - $realtime);
      start = 1'b1;
      #(d + 600.0);                      // between the edge and the next negedge
      sample = code_plain;
      check($countones(sample) == expected,
            $sformatf("d=%0.1f plain count %0d expected %0d", d, $countones(sample), expected));
      if (((sample + 1'b1) & sample) != '0) n_bubbles++;
      for (int i = 0; i < N; i++) if (sample[i] && first_on[i] < 0) first_on[i] = s;
      @(negedge clk);                    // still the sample of edge t_edge
      @(negedge clk);                    // one edge later: count and reordered code
      check(32'(cnt_plain) == 32'(expected), "bit counter on the plain code");
      check(((code_re + 1'b1) & code_re) == '0, $sformatf("d=%0.1f reordered code not a thermometer", d));
      check($countones(code_re) == expected, "reordered count");
      @(negedge clk);
      check(32'(cnt_re) == 32'(expected), "bit counter on the reordered code");
      check(expected >= prev_count, "count never decreases");
      prev_count = expected;
      if (expected == N) n_full++;
      start = 1'b0;
      repeat (3) @(negedge clk);
    end
    // measured order must agree with the order given to the reordering layer
    for (int k = 1; k < N; k++)
      check(first_on[ORD[k]] >= first_on[ORD[k-1]] && first_on[ORD[k]] >= 0,
            $sformatf("measured order disagrees at position %0d", k));
    check(n_bubbles > 0, "bubbles occurred in the plain samples");
    check(n_full > 0, "full line reached");
    $display("steps %0d, plain samples with bubbles %0d, full-line samples %0d", STEPS, n_bubbles, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
