// carry_chain_tb: checks the timing model of the carry chain.
// A rising and then a falling edge are sent down the default 464-tap chain;
// at times between tap arrivals the number of taps that have switched must be
// floor(dt / 6.4 ps) and the taps must form a clean thermometer code. A second
// instance with a 10 ps block-boundary penalty checks that tap 8 (first tap of
// the second block) arrives at 9*6.4 + 10 ps.
`timescale 1ps/1fs
module carry_chain_tb;
  localparam int  N     = 464;
  localparam real TAP   = 6.4;
  int checks = 0, failures = 0;

  logic din = 1'b0;
  logic [N-1:0] taps;
  logic [15:0]  taps_b;

  carry_chain dut (.din(din), .taps(taps));
  carry_chain #(.N_BLOCKS(2), .BLOCK_EXTRA_PS(10.0)) dut_b (.din(din), .taps(taps_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  function automatic bit is_thermo(input logic [N-1:0] v, input bit ones_low);
    // ones_low=1: 1...1 at the low end, zeros above; else zeros at the low end
    logic [N-1:0] w = ones_low ? v : ~v;
    return ((w + 1'b1) & w) == '0;
  endfunction

  real t0;
  initial begin
    #1000.0;
    t0 = $realtime;
    din = 1'b1;
    for (int k = 0; k < 60; k++) begin
      real dt;
      dt = 3.3 + k * 53.71;              // never on a tap boundary
      #(t0 + dt - $realtime);
      check($countones(taps) == ((dt / TAP) >= N ? N : int'($floor(dt / TAP))),
            $sformatf("rise count dt=%0.1f got %0d", dt, $countones(taps)));
      check(is_thermo(taps, 1'b1), "rise thermometer");
    end
    #5000.0;
    check(&taps, "all ones after the full line");
    t0 = $realtime;
    din = 1'b0;
    for (int k = 0; k < 20; k++) begin
      real dt;
      dt = 1.7 + k * 97.3;
      #(t0 + dt - $realtime);
      check($countones(~taps) == ((dt / TAP) >= N ? N : int'($floor(dt / TAP))), "fall count");
      check(is_thermo(taps, 1'b0), "fall thermometer");
    end
    // block-boundary penalty on the second instance
    #5000.0;
    t0 = $realtime;
    din = 1'b1;
    #(9 * TAP + 10.0 - 0.5);
    check(taps_b[7:0] == 8'hFF && taps_b[8] == 1'b0, "tap 8 not yet switched");
    #1.0;
    check(taps_b[8] == 1'b1, "tap 8 switched after boundary penalty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000.0;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
