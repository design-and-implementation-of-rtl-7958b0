// tap_reorder_tb: a 464-tap reordering layer with an order that swaps each
// CARRY8 block's last tap with the next block's first tap (the out-of-order
// pair seen on the device). A sample with that bubble must come out as a clean
// thermometer code one cycle later; random samples are checked bit by bit
// against the order.
`timescale 1ps/1fs
module tap_reorder_tb;
  localparam int N = 464;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #1250 clk = ~clk;

  function automatic tdc_pkg::tap_order_t swap_order();
    tdc_pkg::tap_order_t o = tdc_pkg::identity_order();
    for (int b = 0; b + 1 < N / 8; b++) begin
      o[8*b + 7] = 16'(8*b + 8);
      o[8*b + 8] = 16'(8*b + 7);
    end
    return o;
  endfunction
  localparam tdc_pkg::tap_order_t ORD = swap_order();

  logic [N-1:0] d, q, prev;
  tap_reorder #(.N_TAPS(N), .ORDER(ORD)) dut (.clk(clk), .d(d), .q(q));

  initial begin
    d = '0;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      if (k % 2 == 0) begin
        // bubble: taps 0..8b+6 and 8b+8 switched, 8b+7 not yet
        int b;
        b = $urandom % (N / 8 - 1);
        d = '0;
        for (int i = 0; i < 8*b + 7; i++) d[i] = 1'b1;
        d[8*b + 8] = 1'b1;
      end else begin
        for (int w = 0; w < N; w += 16) d[w +: 16] = 16'($urandom);
      end
      prev = d;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (q[i] != prev[ORD[i]]) begin failures++; $display("FAIL k=%0d bit %0d", k, i); end
      end
      if (k % 2 == 0) begin
        checks++;
        if (((q + 1'b1) & q) != '0) begin failures++; $display("FAIL k=%0d not thermometer", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
